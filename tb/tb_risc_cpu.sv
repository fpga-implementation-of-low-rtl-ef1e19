// tb_risc_cpu: end-to-end test of the accumulator processor.
//
// The testbench builds a program in the processor's memory: a counted loop
// whose body is a random sequence of arithmetic, logic, shift, relational,
// floating point, load and store instructions, then a tail of random
// instructions and a HLT. An instruction-level model of the same instruction
// set runs in lock step. At every falling edge of Fetch (the end of an
// instruction's fetch half) the testbench checks that the accumulator holds
// the model's value after the previous instruction and that the program
// counter holds the model's next address, and that exactly four crystal
// clocks separate two instructions. At the end it compares the stored data
// words. The model uses fp_pkg for the floating point results; those
// functions are checked against the simulator's own floating point
// arithmetic in tb_alu.
`timescale 1ns/1ps
module tb_risc_cpu;
  import risc_pkg::*;

  localparam int unsigned MEM   = 1024;
  localparam int unsigned DATA  = 256;   // data words 256..303
  localparam int unsigned CNT   = 320;   // loop counter
  localparam int unsigned ONE   = 321;   // constant 1
  localparam int unsigned BODY  = 40;
  localparam int unsigned LOOPS = 3;

  logic clk = 1'b0, rst_req = 1'b0;
  logic halted, rd, wr, fetch;
  addr_t pc, addr;
  word_t acc, data_bus;

  int checks = 0, failures = 0;
  int n_op[32];
  int n_jump_taken = 0, n_jz_not = 0, n_store = 0;

  risc_cpu #(.MEM_DEPTH(MEM), .INIT_FILE("")) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  word_t m_mem [MEM];
  word_t m_acc;
  int unsigned m_pc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  function automatic word_t rand_word();
    return $urandom();
  endfunction

  // one instruction of the model
  task automatic m_step();
    word_t ins, m;
    opcode_e op;
    int unsigned a;
    ins = m_mem[m_pc];
    op  = opcode_e'(ins[31:27]);
    a   = int'(ins[26:0]) % MEM;
    m   = m_mem[a];
    n_op[op]++;
    m_pc = m_pc + 1;
    case (op)
      OP_ADD:  m_acc = m_acc + m;
      OP_SUB:  m_acc = m_acc - m;
      OP_AND:  m_acc = m_acc & m;
      OP_OR:   m_acc = m_acc | m;
      OP_XOR:  m_acc = m_acc ^ m;
      OP_XNOR: m_acc = ~(m_acc ^ m);
      OP_NOT:  m_acc = ~m_acc;
      OP_SHL:  m_acc = {m_acc[30:0], 1'b0};
      OP_SHR:  m_acc = {1'b0, m_acc[31:1]};
      OP_LDA:  m_acc = m;
      OP_STA:  begin m_mem[a] = m_acc; n_store++; end
      OP_SLT:  m_acc = ($signed(m_acc) < $signed(m)) ? 32'd1 : 32'd0;
      OP_SEQ:  m_acc = (m_acc == m) ? 32'd1 : 32'd0;
      OP_FADD: m_acc = fp_pkg::fp_add(m_acc, m);
      OP_FSUB: m_acc = fp_pkg::fp_add(m_acc, m ^ 32'h8000_0000);
      OP_FMUL: m_acc = fp_pkg::fp_mul(m_acc, m);
      OP_JMP:  begin m_pc = a; n_jump_taken++; end
      OP_JZ:   if (m_acc == 0) begin m_pc = a; n_jump_taken++; end else n_jz_not++;
      OP_HLT:  m_pc = m_pc - 1;
      default: ;
    endcase
  endtask

  // the first 17 body slots take every non-control opcode once, in order
  function automatic word_t rand_body_instr(input int slot);
    opcode_e ops [17] = '{OP_NOP, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_XNOR,
                          OP_NOT, OP_SHL, OP_SHR, OP_LDA, OP_STA, OP_SLT, OP_SEQ,
                          OP_FADD, OP_FSUB, OP_FMUL};
    opcode_e op = (slot >= 0 && slot < 17) ? ops[slot] : ops[$urandom_range(16)];
    int unsigned a = DATA + $urandom_range(47);
    return make_instr(op, addr_t'(a));
  endfunction

  initial begin : main
    int unsigned p, loop_top, done_jz, t_prev, k;
    realtime t_last;
    for (int i = 0; i < MEM; i++) m_mem[i] = '0;
    for (int i = 0; i < 48; i++) begin
      // mix of integers and well-formed floats
      m_mem[DATA+i] = (i % 2 == 1) ? rand_word()
                              : {1'($urandom), 8'(100 + $urandom_range(50)), 23'($urandom)};
    end
    m_mem[DATA] = 32'h0000_0000;       // a zero for SEQ/SLT corner cases
    m_mem[DATA+1] = m_mem[DATA+3];     // an equal pair for SEQ
    m_mem[CNT] = LOOPS;
    m_mem[ONE] = 1;
    p = 0;
    loop_top = p;
    for (int i = 0; i < BODY; i++) m_mem[p++] = rand_body_instr(i);
    m_mem[p++] = make_instr(OP_LDA, addr_t'(DATA + 3));
    m_mem[p++] = make_instr(OP_SEQ, addr_t'(DATA + 1));   // acc = 1
    m_mem[p++] = make_instr(OP_LDA, addr_t'(CNT));
    m_mem[p++] = make_instr(OP_SUB, addr_t'(ONE));
    m_mem[p++] = make_instr(OP_STA, addr_t'(CNT));
    done_jz = p;
    m_mem[p++] = '0;                                        // JZ, patched below
    m_mem[p++] = make_instr(OP_JMP, addr_t'(loop_top));
    m_mem[done_jz] = make_instr(OP_JZ, addr_t'(p));
    for (int i = 0; i < 20; i++) m_mem[p++] = rand_body_instr(-1);
    m_mem[p++] = make_instr(OP_HLT, '0);
    for (int i = 0; i < MEM; i++) dut.u_mem.mem[i] = m_mem[i];

    m_acc = '0;
    m_pc  = 0;
    // let the clocks run first, so that the internal reset has settled low
    // and the request below makes a clean rising edge on it
    repeat (12) @(posedge clk);
    #2 rst_req = 1'b1;              // asynchronous request
    repeat (3) @(posedge clk);
    #1 rst_req = 1'b0;

    k = 0;
    t_last = 0;
    forever begin
      @(negedge fetch);
      #1;
      if (k > 0) check(($realtime - t_last) == 40.0, "four clocks per instruction");
      t_last = $realtime;
      check(acc == m_acc, $sformatf("acc %h expected %h (instr %0d)", acc, m_acc, k));
      if (opcode_e'(m_mem[m_pc][31:27]) == OP_HLT) begin
        check(halted, "halt flag");
        break;
      end
      m_step();
      check(pc == addr_t'(m_pc), $sformatf("pc %0d expected %0d", pc, m_pc));
      k++;
    end
    // the HLT loops: PC stays put
    @(negedge fetch); #1;
    check(pc == addr_t'(m_pc), "pc holds at HLT");
    for (int i = DATA; i < DATA + 48; i++)
      check(dut.u_mem.mem[i] == m_mem[i], $sformatf("mem[%0d]", i));
    check(dut.u_mem.mem[CNT] == 0, "loop counter reached zero");

    // every mechanism must have happened
    foreach (n_op[i]) if (i <= int'(OP_HLT) && i != int'(OP_HLT)) begin
      if (n_op[i] == 0) begin
        $display("opcode %0d never executed", i);
        failures++;
      end
    end
    if (n_jump_taken < LOOPS || n_jz_not == 0 || n_store == 0) begin
      $display("jumps taken %0d, JZ not taken %0d, stores %0d", n_jump_taken, n_jz_not, n_store);
      failures++;
    end
    $display("instructions %0d, jumps taken %0d, JZ not taken %0d, stores %0d",
             k, n_jump_taken, n_jz_not, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
