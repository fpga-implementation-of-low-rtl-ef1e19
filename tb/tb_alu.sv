// tb_alu: every opcode with random operands. The integer results are
// computed here with plain SystemVerilog operators; the floating point
// results by exact double precision arithmetic rounded here to single
// precision (ties to even), on operands
// that are normal numbers whose results stay normal (the ALU flushes
// subnormals, which is not exercised here), plus exact cancellation and zero
// operands. Each result must appear at alu_out only after the rising edge of
// the ALU clock.
`timescale 1ns/1ps
module tb_alu;
  import risc_pkg::*;
  logic alu_clk = 1'b0, in_rst = 1'b0;
  logic [4:0] opcode;
  word_t acc, data_bus, alu_out, expected;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rand_float(input int lo, input int hi);
    return {1'($urandom), 8'(lo + $urandom_range(hi - lo)), 23'($urandom)};
  endfunction

  // exact value of a single precision pattern (normal or zero)
  function automatic real f2r(input word_t x);
    real m;
    int  k;
    if (x[30:23] == 0) return 0.0;
    m = real'({1'b1, x[22:0]});
    k = int'(x[30:23]) - 150;             // value = m * 2**k
    for (int i = 0; i < k; i++)  m = m * 2.0;
    for (int i = 0; i < -k; i++) m = m / 2.0;
    return x[31] ? -m : m;
  endfunction

  // double to single, round to nearest even, from the double's bit pattern
  function automatic word_t r2f(input real r);
    logic [63:0] d;
    logic [52:0] mant;
    logic [23:0] m24;
    logic [28:0] rest;
    logic [24:0] mr;
    int e;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    mant = {1'b1, d[51:0]};
    m24  = mant[52:29];
    rest = mant[28:0];
    e    = int'(d[62:52]) - 1023 + 127;
    mr   = {1'b0, m24};
    if (rest > 29'h1000_0000 || (rest == 29'h1000_0000 && m24[0])) mr = mr + 1;
    if (mr[24]) begin mr = mr >> 1; e++; end
    return {d[63], e[7:0], mr[22:0]};
  endfunction

  function automatic word_t ref_op(input opcode_e op, input word_t a, input word_t b);
    real fa, fb;   // exact for single precision operands
    fa = f2r(a);
    fb = f2r(b);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_XNOR: return a ~^ b;
      OP_NOT:  return ~a;
      OP_SHL:  return {a[30:0], 1'b0};
      OP_SHR:  return {1'b0, a[31:1]};
      OP_LDA:  return b;
      OP_SLT:  return ($signed(a) < $signed(b)) ? 1 : 0;
      OP_SEQ:  return (a == b) ? 1 : 0;
      OP_FADD: return r2f(fa + fb);
      OP_FSUB: return r2f(fa - fb);
      OP_FMUL: return r2f(fa * fb);
      default: return a;
    endcase
  endfunction

  task automatic apply(input opcode_e op, input word_t a, input word_t b);
    opcode = op; acc = a; data_bus = b;
    expected = ref_op(op, a, b);
    #2 alu_clk = 1'b1;
    #1;
    checks++;
    if (alu_out !== expected) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h expected %h", op, a, b, alu_out, expected);
    end
    // a change of inputs while the ALU clock stays high must not show
    acc = ~a;
    #1;
    checks++;
    if (alu_out !== expected) begin
      failures++;
      $display("FAIL output changed without an ALU clock edge");
    end
    #1 alu_clk = 1'b0;
  endtask

  initial begin
    word_t a, b;
    #1 in_rst = 1'b1;
    #1 in_rst = 1'b0;
    checks++;
    if (alu_out !== '0) begin failures++; $display("FAIL reset"); end
    for (int op = 0; op < 20; op++) begin
      repeat (200) begin
        if (op == int'(OP_FMUL)) begin
          // products stay normal: biased exponents 90..164
          a = rand_float(90, 164);
          b = rand_float(90, 164);
        end else if (op == int'(OP_FADD) || op == int'(OP_FSUB)) begin
          a = rand_float(64, 190);
          b = ($urandom_range(3) == 0) ? rand_float(64, 190)
                                       : {1'($urandom), 8'(a[30:23] - 8'($urandom_range(30)) + 8'd15), 23'($urandom)};
        end else begin
          a = $urandom;
          b = ($urandom_range(7) == 0) ? a : $urandom;
        end
        apply(opcode_e'(op), a, b);
      end
    end
    // floating point corner cases
    apply(OP_FSUB, 32'h3fc0_0000, 32'h3fc0_0000);   // x - x = +0
    apply(OP_FADD, 32'h0000_0000, 32'h4049_0fdb);   // 0 + pi
    apply(OP_FADD, 32'hc049_0fdb, 32'h0000_0000);
    apply(OP_FMUL, 32'h0000_0000, 32'h4049_0fdb);   // 0 * pi
    apply(OP_FADD, 32'h3f80_0000, 32'h3380_0000);   // 1 + 2^-24: tie, to even
    apply(OP_FADD, 32'h3f80_0001, 32'h3380_0000);   // tie, rounds up
    apply(OP_FADD, 32'h4b80_0000, 32'hbf80_0000);   // 2^24 - 1
    apply(OP_FMUL, 32'h3f80_0001, 32'h3f80_0001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
