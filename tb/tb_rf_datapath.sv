// tb_rf_datapath: the data path driven directly through its control lines.
// Registers are filled through the immediate write-back, then random ALU
// operations (register or immediate operand), loads, stores and branch
// evaluations are applied and compared with a model of the registers and
// the 16-word data memory.
`timescale 1ns/1ps
module tb_rf_datapath;
  import rf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  rcl_t rcl = '0;
  mcl_t mcl = '0;
  alucl_t alucl = '0;
  bucl_t bucl = '0;
  imm_t imm = '0;
  logic branch_flag;
  pc_t branch_addr;
  xword_t wb_data;
  xword_t m_r [32];
  xword_t m_m [16];
  int checks = 0, failures = 0;

  rf_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic xword_t alu_ref(input int o, input xword_t a, input xword_t b);
    case (o)
      0: return a + b;
      1: return a - b;
      2: return a & b;
      3: return a | b;
      4: return a ^ b;
      5: return a ~^ b;
      6: return a << b[4:0];
      7: return a >> b[4:0];
      default: return (signed'(a) < signed'(b)) ? 1 : 0;
    endcase
  endfunction

  task automatic idle();
    rcl.we = 1'b0; mcl = '0; bucl.en = 1'b0;
  endtask

  initial begin
    int o;
    ridx_t rd, r1, r2;
    xword_t ea;
    bit e;
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      imm = imm_t'($urandom);
      rcl = '{we: 1'b1, waddr: ridx_t'(i), raddr1: '0, raddr2: '0, wb_sel: WB_IMM};
      m_r[i] = {{16{imm[15]}}, imm};
    end
    for (int i = 0; i < 16; i++) begin       // fill the data memory
      @(negedge clk);
      rcl = '{we: 1'b0, waddr: '0, raddr1: 5'd0, raddr2: ridx_t'(i), wb_sel: WB_ALU};
      imm = imm_t'(i) - imm_t'(m_r[0][15:0]);
      mcl = '{ea_load: 1'b1, we: 1'b0};
      @(negedge clk);
      mcl = '{ea_load: 1'b0, we: 1'b1};
      m_m[4'(m_r[0] + {{16{imm[15]}}, imm})] = m_r[i];
    end
    @(negedge clk) idle();
    repeat (600) begin
      @(negedge clk);
      rd = ridx_t'($urandom); r1 = ridx_t'($urandom); r2 = ridx_t'($urandom);
      imm = imm_t'($urandom);
      case ($urandom_range(3))
        0: begin                                 // ALU
          o = $urandom_range(8);
          alucl = '{op: alu_op_e'(o), use_imm: 1'($urandom_range(1))};
          rcl = '{we: 1'b1, waddr: rd, raddr1: r1, raddr2: r2, wb_sel: WB_ALU};
          #1 check(wb_data == alu_ref(o, m_r[r1], alucl.use_imm ? {{16{imm[15]}}, imm} : m_r[r2]),
                   "ALU result on the write-back bus");
          @(posedge clk);
          m_r[rd] = alu_ref(o, m_r[r1], alucl.use_imm ? {{16{imm[15]}}, imm} : m_r[r2]);
        end
        1: begin                                 // load: address, then write-back
          rcl = '{we: 1'b0, waddr: rd, raddr1: r1, raddr2: r2, wb_sel: WB_MEM};
          mcl = '{ea_load: 1'b1, we: 1'b0};
          ea = m_r[r1] + {{16{imm[15]}}, imm};
          @(negedge clk);
          mcl = '0;
          rcl.we = 1'b1;
          #1 check(wb_data == m_m[ea[3:0]], "loaded word");
          @(posedge clk);
          m_r[rd] = m_m[ea[3:0]];
        end
        2: begin                                 // store: address, then write
          rcl = '{we: 1'b0, waddr: rd, raddr1: r1, raddr2: r2, wb_sel: WB_ALU};
          mcl = '{ea_load: 1'b1, we: 1'b0};
          ea = m_r[r1] + {{16{imm[15]}}, imm};
          @(negedge clk);
          mcl = '{ea_load: 1'b0, we: 1'b1};
          @(posedge clk);
          m_m[ea[3:0]] = m_r[r2];
        end
        default: begin                           // branch evaluation
          if ($urandom_range(2) == 0) r2 = r1;
          rcl = '{we: 1'b0, waddr: rd, raddr1: r1, raddr2: r2, wb_sel: WB_ALU};
          bucl = '{en: 1'b1, cond: br_cond_e'($urandom_range(3))};
          case (bucl.cond)
            B_EQ: e = m_r[r2] == m_r[r1];
            B_NE: e = m_r[r2] != m_r[r1];
            B_LT: e = signed'(m_r[r2]) < signed'(m_r[r1]);
            default: e = 1'b1;
          endcase
          #1 check(branch_flag == e && branch_addr == pc_t'(imm), "branch flag and address");
        end
      endcase
      @(negedge clk) idle();
    end
    for (int i = 0; i < 32; i++) check(dut.u_rf.regs[i] == m_r[i], $sformatf("r%0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
