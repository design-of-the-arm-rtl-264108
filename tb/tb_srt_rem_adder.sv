// tb_srt_rem_adder: checks one speculative remainder adder by value.
//
// For random remainders (random head and carry-save tail, the tail carry's
// lowest bit clear as the adder leaves it), addends and carry-ins, the value
// of the result, head*2^50 + sum + carry, must equal 4*(value of the input)
// + addend + carry-in modulo 2^58. The head must also be the exact top of
// that value whenever the tail words are small enough not to carry into it.
module tb_srt_rem_adder;
  import srt_pkg::*;

  rem_t          rin, rout;
  logic [RW-1:0] add;
  logic          cin;
  int            checks = 0, failures = 0;

  srt_rem_adder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [RW-1:0] value(rem_t r);
    return {r.head, r.sum} + {{HEAD_W{1'b0}}, r.carry};
  endfunction

  initial begin
    logic [RW-1:0] exp_v;
    for (int n = 0; n < 20000; n++) begin
      rin.head  = 8'($urandom);
      rin.sum   = {18'($urandom), 32'($urandom)};
      rin.carry = {18'($urandom), 31'($urandom), 1'b0};
      if (n % 4 == 0) begin rin.sum = '0; rin.carry = '0; end
      add = {26'($urandom), 32'($urandom)};
      if (n % 5 == 0) add = '0;
      cin = 1'($urandom);
      #1;
      exp_v = (value(rin) << 2) + add + RW'(cin);
      checks++;
      if (value(rout) != exp_v || rout.carry[0] != 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL got=%h exp=%h", value(rout), exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
