// tb_mips_lite_cpu: end-to-end test of the single-cycle MIPS-lite processor
// at its default sizes (1024-word instruction and data memories).
//
// The bench assembles a program into the instruction memory: a fixed part
// that fills an array with SW, then sums it in a loop with LW, ADDU, SUBU,
// ORI and a backward BEQ, followed by a part of random instructions with
// forward branches, and a final "beq $0,$0,-1" on which the processor
// spins. An instruction-level reference model kept here runs the same
// program; every cycle the processor's PC, register write and memory write
// are compared with it, so the test also checks that each instruction takes
// exactly one clock. At the end the sum computed by the program and the
// whole register file are compared with the model.
//
// Mechanisms counted, each required at least once: every instruction type,
// a taken and a not-taken branch, a backward branch, a load that reads a
// value stored earlier, sign- and zero-extended immediates with bit 15 set,
// and a write to register 0 that must be dropped.
module tb_mips_lite_cpu;
  import mips_lite_pkg::*;

  localparam int IMEM_WORDS = 1024;
  localparam int DMEM_WORDS = 1024;

  logic clk = 0, rst;
  logic [31:0] pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic [4:0]  reg_waddr;
  logic        reg_we, mem_we;
  int checks = 0, failures = 0;

  mips_lite_cpu dut (
    .clk(clk), .rst(rst), .pc(pc), .instr(instr),
    .reg_we(reg_we), .reg_waddr(reg_waddr), .reg_wdata(reg_wdata),
    .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata)
  );

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- assembler
  function automatic logic [31:0] r_type(logic [5:0] fn, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_type(logic [5:0] op, int rt, int rs, logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction
  function automatic logic [31:0] addu(int rd, int rs, int rt); return r_type(6'h21, rd, rs, rt); endfunction
  function automatic logic [31:0] subu(int rd, int rs, int rt); return r_type(6'h23, rd, rs, rt); endfunction
  function automatic logic [31:0] ori(int rt, int rs, int imm);  return i_type(6'h0d, rt, rs, 16'(imm)); endfunction
  function automatic logic [31:0] lw(int rt, int off, int rs);   return i_type(6'h23, rt, rs, 16'(off)); endfunction
  function automatic logic [31:0] sw(int rt, int off, int rs);   return i_type(6'h2b, rt, rs, 16'(off)); endfunction
  function automatic logic [31:0] beq(int rs, int rt, int off);  return i_type(6'h04, rt, rs, 16'(off)); endfunction

  logic [31:0] prog [IMEM_WORDS];
  int n_instr = 0;
  function automatic void emit(logic [31:0] w);
    prog[n_instr] = w;
    n_instr++;
  endfunction

  // ---------------------------------------------------------- reference model
  logic [31:0] m_pc;
  logic [31:0] m_reg [32];
  logic [31:0] m_mem [DMEM_WORDS];
  logic        m_written [DMEM_WORDS];

  int cnt_addu, cnt_subu, cnt_ori, cnt_lw, cnt_sw, cnt_beq_taken, cnt_beq_not,
      cnt_back, cnt_ld_after_st, cnt_sext_neg, cnt_zext_hi, cnt_r0_write;
  initial begin
    {cnt_addu, cnt_subu, cnt_ori, cnt_lw, cnt_sw, cnt_beq_taken, cnt_beq_not} = '0;
    {cnt_back, cnt_ld_after_st, cnt_sext_neg, cnt_zext_hi, cnt_r0_write} = '0;
  end

  // Works out the architectural effect of the instruction at m_pc, compares
  // it with what the processor is about to do in this cycle, then commits it.
  task automatic step_and_compare();
    logic [31:0] w, a, b, sx, zx, res, npc;
    logic [5:0]  op, fn;
    int rs, rt, rd;
    logic        e_rwe, e_mwe;
    int          e_rd;
    logic [31:0] e_rdata, e_maddr, e_mdata;

    w  = prog[m_pc[11:2]];
    op = w[31:26]; fn = w[5:0];
    rs = int'(w[25:21]); rt = int'(w[20:16]); rd = int'(w[15:11]);
    a  = m_reg[rs]; b = m_reg[rt];
    sx = {{16{w[15]}}, w[15:0]};
    zx = {16'h0, w[15:0]};
    npc = m_pc + 4;
    e_rwe = 0; e_mwe = 0; e_rd = 0; e_rdata = 0; e_maddr = 0; e_mdata = 0;
    case (op)
      6'h00: if (fn == 6'h21 || fn == 6'h23) begin
        res = (fn == 6'h21) ? a + b : a - b;
        e_rwe = 1; e_rd = rd; e_rdata = res;
        if (fn == 6'h21) cnt_addu++; else cnt_subu++;
      end
      6'h0d: begin
        e_rwe = 1; e_rd = rt; e_rdata = a | zx; cnt_ori++;
        if (w[15]) cnt_zext_hi++;
      end
      6'h23: begin
        e_maddr = a + sx;
        e_rwe = 1; e_rd = rt; e_rdata = m_mem[e_maddr[11:2]]; cnt_lw++;
        if (m_written[e_maddr[11:2]]) cnt_ld_after_st++;
        if (w[15]) cnt_sext_neg++;
      end
      6'h2b: begin
        e_maddr = a + sx; e_mwe = 1; e_mdata = b; cnt_sw++;
        if (w[15]) cnt_sext_neg++;
      end
      6'h04: begin
        if (a == b) begin
          npc = m_pc + 4 + {sx[29:0], 2'b00};
          cnt_beq_taken++;
          if (w[15]) cnt_back++;
        end else cnt_beq_not++;
      end
      default: ;
    endcase

    checks++;
    if (pc !== m_pc || instr !== w) begin
      failures++;
      if (failures < 10) $display("FAIL pc=%h instr=%h exp pc=%h instr=%h", pc, instr, m_pc, w);
    end
    checks++;
    if (reg_we !== e_rwe || (e_rwe && (reg_waddr !== 5'(e_rd) || reg_wdata !== e_rdata))) begin
      failures++;
      if (failures < 10) $display("FAIL pc=%h reg write %b r%0d=%h exp %b r%0d=%h",
                                  m_pc, reg_we, reg_waddr, reg_wdata, e_rwe, e_rd, e_rdata);
    end
    checks++;
    if (mem_we !== e_mwe || (e_mwe && (mem_addr !== e_maddr || mem_wdata !== e_mdata))) begin
      failures++;
      if (failures < 10) $display("FAIL pc=%h mem write %b [%h]=%h exp %b [%h]=%h",
                                  m_pc, mem_we, mem_addr, mem_wdata, e_mwe, e_maddr, e_mdata);
    end

    if (e_rwe && e_rd == 0) cnt_r0_write++;
    if (e_rwe && e_rd != 0) m_reg[e_rd] = e_rdata;
    if (e_mwe) begin
      m_mem[e_maddr[11:2]] = e_mdata;
      m_written[e_maddr[11:2]] = 1;
    end
    m_pc = npc;
  endtask

  // ------------------------------------------------------------------ program
  localparam int ARRAY_BASE = 32'h100;   // byte address of the array
  localparam int N_ELEM     = 12;
  int halt_pc, exp_sum, loop_pc;

  task automatic build_program();
    int r, t, fwd;
    // r1 <- array base, r2 <- 1, r3 <- element count, r4 <- running value
    emit(ori(1, 0, ARRAY_BASE));
    emit(ori(2, 0, 1));
    emit(ori(3, 0, N_ELEM));
    emit(ori(4, 0, 16'h8003));           // zero extension of a value with bit 15 set
    emit(addu(0, 2, 2));                 // write to r0, must be dropped
    // fill loop: mem[r1 + 4*i] = r4; r4 += r4 - 1
    loop_pc = n_instr;
    emit(sw(4, 0, 1));
    emit(addu(4, 4, 4));
    emit(subu(4, 4, 2));
    emit(ori(5, 0, 4));
    emit(addu(1, 1, 5));
    emit(subu(3, 3, 2));
    emit(beq(3, 0, 1));                  // leave the loop when r3 == 0
    emit(beq(0, 0, loop_pc - (n_instr + 1)));  // backward branch
    // sum loop: reads the array back with a negative offset from its end
    emit(ori(3, 0, N_ELEM));
    emit(ori(6, 0, 0));
    loop_pc = n_instr;
    emit(lw(7, -4, 1));
    emit(addu(6, 6, 7));
    emit(subu(1, 1, 5));
    emit(subu(3, 3, 2));
    emit(beq(3, 0, 1));
    emit(beq(0, 0, loop_pc - (n_instr + 1)));
    emit(sw(6, 0, 0));                   // result at address 0
    emit(lw(8, 0, 0));
    // random part: registers 9..15 and a small memory window
    for (int i = 0; i < 300; i++) begin
      r = 9 + int'($urandom % 7);
      t = 9 + int'($urandom % 7);
      case ($urandom % 8)
        0: emit(addu(r, t, 9 + int'($urandom % 7)));
        1: emit(subu(r, t, 9 + int'($urandom % 7)));
        2: emit(ori(r, t, int'($urandom % 65536)));
        3: emit(ori(r, 0, int'($urandom % 256) * 4));
        4: emit(lw(r, int'($urandom % 64) * 4 - 128, 0));
        5: emit(sw(t, int'($urandom % 64) * 4 - 128, 0));
        6: begin
          fwd = int'($urandom % 4);
          emit(beq(r, ($urandom % 2) ? t : r, fwd));
        end
        default: emit(addu(r, 0, t));
      endcase
    end
    halt_pc = n_instr * 4;
    emit(beq(0, 0, -1));
    for (int i = n_instr; i < IMEM_WORDS; i++) prog[i] = beq(0, 0, -1);
  endtask

  // ------------------------------------------------------------------- run
  int cycles;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_program();
    for (int i = 0; i < IMEM_WORDS; i++) dut.u_ifu.u_imem.mem[i] = prog[i];
    for (int i = 0; i < 32; i++) m_reg[i] = 0;
    for (int i = 0; i < DMEM_WORDS; i++) begin
      m_mem[i] = 0; m_written[i] = 0;
    end
    // the registers and the data memory start at zero on both sides
    for (int i = 1; i < 32; i++) dut.u_rf.regs[i] = 0;
    for (int i = 0; i < DMEM_WORDS; i++) dut.u_dmem.mem[i] = 0;
    exp_sum = 0;
    begin
      automatic int v = 16'h8003;
      for (int i = 0; i < N_ELEM; i++) begin
        exp_sum += v;
        v = v + v - 1;
      end
    end

    rst = 1;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    m_pc = 0;
    cycles = 0;
    while (m_pc != 32'(halt_pc) && cycles < 100000) begin
      #3;                       // inputs settled, before the next edge
      step_and_compare();
      @(posedge clk);
      #1;
      cycles++;
    end
    // one instruction per clock: the processor must sit on the halt loop now
    checks++;
    if (pc !== 32'(halt_pc)) begin
      failures++;
      $display("FAIL after %0d cycles pc=%h, expected halt at %h", cycles, pc, halt_pc);
    end
    // result of the array sum
    checks++;
    if (dut.u_rf.regs[8] !== 32'(exp_sum) || m_reg[8] !== 32'(exp_sum)) begin
      failures++;
      $display("FAIL sum r8=%h model=%h exp %h", dut.u_rf.regs[8], m_reg[8], exp_sum);
    end
    for (int i = 1; i < 32; i++) begin
      checks++;
      if (dut.u_rf.regs[i] !== m_reg[i]) begin
        failures++;
        $display("FAIL final r%0d=%h exp %h", i, dut.u_rf.regs[i], m_reg[i]);
      end
    end
    $display("cycles=%0d instructions=%0d addu=%0d subu=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not=%0d backward=%0d load_after_store=%0d neg_offset=%0d zext_hi=%0d r0_write=%0d",
             cycles, cycles, cnt_addu, cnt_subu, cnt_ori, cnt_lw, cnt_sw, cnt_beq_taken,
             cnt_beq_not, cnt_back, cnt_ld_after_st, cnt_sext_neg, cnt_zext_hi, cnt_r0_write);
    begin
      automatic int c [12] = '{cnt_addu, cnt_subu, cnt_ori, cnt_lw, cnt_sw, cnt_beq_taken, cnt_beq_not,
                     cnt_back, cnt_ld_after_st, cnt_sext_neg, cnt_zext_hi, cnt_r0_write};
      for (int k = 0; k < 12; k++) begin
        checks++;
        if (c[k] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
