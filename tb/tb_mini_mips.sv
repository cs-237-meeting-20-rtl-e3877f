// tb_mini_mips: self-checking test of the single-cycle mini-MIPS processor.
// A reference instruction-set model written here executes the same program
// as the processor, one instruction per clock. Each cycle the testbench
// compares the processor's PC with the model's and, on a store, the store
// address and data. Programs end by storing every register, so register
// contents are checked too. First a directed program exercises each
// instruction (including slt on negative numbers, a write to register 0,
// forward and backward branches); then random programs mix all eight
// instructions with forward branches. Data memory is preloaded through a
// hierarchical reference, because the instruction subset has no way to make
// constants. Smaller memories than the defaults keep the run short.
module tb_mini_mips;
  import tb_mips_asm_pkg::*;

  localparam int IAW = 9;
  localparam int DAW = 5;

  logic            clk = 0, rst;
  logic            imem_we;
  logic [IAW-1:0]  imem_waddr;
  logic [31:0]     imem_wdata, pc, dmem_addr, dmem_wdata;
  logic            dmem_we;
  int checks = 0, failures = 0;

  mini_mips #(.IMEM_AW(IAW), .DMEM_AW(DAW)) dut (
    .clk(clk), .rst(rst), .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc(pc), .dmem_we(dmem_we), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program and reference model state
  logic [31:0] prog [2**IAW];
  int          prog_len;
  logic [31:0] m_regs [32];
  logic [31:0] m_mem  [2**DAW];
  logic [31:0] m_pc;
  logic        m_st;
  logic [31:0] m_st_addr, m_st_data;

  task automatic emit(input logic [31:0] w);
    prog[prog_len] = w;
    prog_len++;
  endtask

  // one instruction of the reference model
  task automatic model_step();
    logic [31:0] ir, a, b, addr, imm;
    ir   = prog[m_pc[IAW+1:2]];
    a    = m_regs[ir[25:21]];
    b    = m_regs[ir[20:16]];
    imm  = {{16{ir[15]}}, ir[15:0]};
    m_st = 1'b0;
    m_pc = m_pc + 4;
    case (ir[31:26])
      6'h23: begin addr = a + imm; if (ir[20:16] != 0) m_regs[ir[20:16]] = m_mem[addr[DAW+1:2]]; end
      6'h2B: begin addr = a + imm; m_mem[addr[DAW+1:2]] = b; m_st = 1'b1; m_st_addr = addr; m_st_data = b; end
      6'h04: if (a == b) m_pc = m_pc + (imm << 2);
      6'h00: if (ir[15:11] != 0) begin
        case (ir[5:0])
          6'h20: m_regs[ir[15:11]] = a + b;
          6'h22: m_regs[ir[15:11]] = a - b;
          6'h24: m_regs[ir[15:11]] = a & b;
          6'h25: m_regs[ir[15:11]] = a | b;
          6'h2A: m_regs[ir[15:11]] = {31'd0, $signed(a - b) < 0};
          default: ;
        endcase
      end
      default: ;
    endcase
  endtask

  // load the program, preload data memory in both, run for 'cycles' clocks
  task automatic run_program(input int cycles);
    rst = 1;
    for (int i = 0; i < 2**IAW; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = IAW'(i); imem_wdata = (i < prog_len) ? prog[i] : i_beq(0, 0, -1);
      if (i >= prog_len) prog[i] = i_beq(0, 0, -1);
    end
    @(negedge clk);
    imem_we = 0;
    for (int i = 0; i < 2**DAW; i++) begin
      m_mem[i] = (i < 8) ? 32'(i * 3 - 7) : $urandom;
      dut.u_dmem.mem[i] = m_mem[i];
    end
    foreach (m_regs[i]) m_regs[i] = '0;
    m_pc = 0;
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < cycles; c++) begin
      checks++;
      if (pc !== m_pc) begin failures++; $display("FAIL cycle %0d pc=%h exp %h", c, pc, m_pc); end
      model_step();
      checks++;
      if (dmem_we !== m_st || (m_st && (dmem_addr !== m_st_addr || dmem_wdata !== m_st_data))) begin
        failures++;
        $display("FAIL cycle %0d store we=%b addr=%h data=%h exp we=%b addr=%h data=%h",
                 c, dmem_we, dmem_addr, dmem_wdata, m_st, m_st_addr, m_st_data);
      end
      @(negedge clk);
    end
  endtask

  task automatic store_all_regs();
    for (int r = 1; r < 32; r++) emit(i_sw(r, 4 * r, 0));
  endtask

  initial begin
    imem_we = 0; imem_waddr = 0; imem_wdata = 0; rst = 1;

    // directed program; mem[i] = 3i - 7 for i < 8
    prog_len = 0;
    emit(i_lw(1, 0, 0));       // $1 = -7
    emit(i_lw(2, 16, 0));      // $2 = 5
    emit(i_lw(3, 8, 0));       // $3 = -1
    emit(i_add(4, 1, 2));      // -2
    emit(i_sub(5, 2, 1));      // 12
    emit(i_and(6, 1, 2));
    emit(i_or(7, 1, 2));
    emit(i_slt(8, 1, 2));      // 1
    emit(i_slt(9, 2, 1));      // 0
    emit(i_add(0, 2, 2));      // ignored
    emit(i_add(10, 0, 2));     // 5
    emit(i_beq(2, 1, 3));      // not taken
    emit(i_beq(10, 2, 1));     // taken, skips next
    emit(i_add(11, 2, 2));     // skipped
    emit(i_lw(12, 4, 4));      // address -2 + 4 = 2 -> word 0
    emit(i_sw(5, 12, 1));      // mem[(-7+12)>>2 = 1] = 12
    emit(i_lw(13, 4, 0));      // 12
    emit(i_add(14, 14, 2));    // loop counter: $14 += 5
    emit(i_slt(15, 14, 5));    // $14 < 12 ?
    emit(i_beq(15, 9, 1));     // exit when not less
    emit(i_beq(0, 0, -4));     // backward branch
    store_all_regs();
    emit(i_beq(0, 0, -1));     // halt
    run_program(prog_len + 20);

    // random programs
    for (int p = 0; p < 40; p++) begin
      prog_len = 0;
      for (int i = 1; i < 8; i++) emit(i_lw(i, 4 * i, 0));
      for (int i = 0; i < 150; i++) begin
        int k  = $urandom_range(0, 8);
        int rd = $urandom_range(0, 9), rs = $urandom_range(0, 9), rt = $urandom_range(0, 9);
        case (k)
          0: emit(i_add(rd, rs, rt));
          1: emit(i_sub(rd, rs, rt));
          2: emit(i_and(rd, rs, rt));
          3: emit(i_or(rd, rs, rt));
          4: emit(i_slt(rd, rs, rt));
          5: emit(i_lw(rt, $urandom_range(0, 40) - 20, rs));
          6: emit(i_sw(rt, $urandom_range(0, 40) - 20, rs));
          7: emit(i_beq(rs, rt, $urandom_range(0, 4)));
          default: emit(i_beq(rs, rs, $urandom_range(0, 2)));
        endcase
      end
      store_all_regs();
      emit(i_beq(0, 0, -1));
      run_program(prog_len + 10);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
