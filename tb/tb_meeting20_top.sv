// tb_meeting20_top: end-to-end test of the top level at its default sizes.
// Both circuits compute greatest common divisors of the same number pairs:
// the processor runs a subtract-and-compare GCD program (preceded by a few
// add/and/or instructions and a write to register 0) on operands preloaded
// into its data memory, and the GCD circuit is reset with the same operands.
// Results are checked against Euclid's algorithm computed here, and the
// cycle counts against the expected one instruction per clock for the
// program and one subtraction per clock for the GCD circuit. Every mechanism
// of the two designs is counted (each instruction, taken and untaken beq,
// ignored write to register 0, GCD load, X step, Y step, completion); a
// mechanism that never happens counts as a failure.
module tb_meeting20_top;
  import tb_mips_asm_pkg::*;

  localparam int IAW = 8;   // defaults of the top
  localparam int DAW = 8;

  logic           clk = 0, rst;
  logic           imem_we;
  logic [IAW-1:0] imem_waddr;
  logic [31:0]    imem_wdata, pc, dmem_addr, dmem_wdata;
  logic           dmem_we;
  logic           gcd_reset, gcd_equal;
  logic [7:0]     gcd_x_in, gcd_y_in, gcd_x, gcd_y;
  int checks = 0, failures = 0;

  meeting20_top dut (
    .clk(clk), .rst(rst), .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc(pc), .dmem_we(dmem_we), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata),
    .gcd_reset(gcd_reset), .gcd_x_in(gcd_x_in), .gcd_y_in(gcd_y_in),
    .gcd_x(gcd_x), .gcd_y(gcd_y), .gcd_equal(gcd_equal));

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {
    M_LW, M_SW, M_ADD, M_SUB, M_AND, M_OR, M_SLT, M_BEQ_TAKEN, M_BEQ_NOT_TAKEN,
    M_R0_WRITE, M_GCD_LOAD, M_GCD_X_STEP, M_GCD_Y_STEP, M_GCD_DONE, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  logic [31:0] prog [2**IAW];
  int          prog_len;

  task automatic emit(input logic [31:0] w);
    prog[prog_len] = w;
    prog_len++;
  endtask

  function automatic int euclid(int p, int q);
    while (q != 0) begin int t = p % q; p = q; q = t; end
    return p;
  endfunction

  function automatic int sub_steps(int p, int q);
    int n = 0;
    while (p != q) begin
      if (p > q) p -= q; else q -= p;
      n++;
    end
    return n;
  endfunction

  // count processor mechanisms from the instruction at the current PC
  task automatic count_instr(input logic [31:0] ir, input logic [31:0] cur_pc, input logic [31:0] next_pc);
    case (ir[31:26])
      6'h23: mech[M_LW]++;
      6'h2B: mech[M_SW]++;
      6'h04: if (next_pc != cur_pc + 4) mech[M_BEQ_TAKEN]++; else mech[M_BEQ_NOT_TAKEN]++;
      6'h00: begin
        if (ir[15:11] == 0) mech[M_R0_WRITE]++;
        case (ir[5:0])
          6'h20: mech[M_ADD]++;
          6'h22: mech[M_SUB]++;
          6'h24: mech[M_AND]++;
          6'h25: mech[M_OR]++;
          6'h2A: mech[M_SLT]++;
          default: ;
        endcase
      end
      default: ;
    endcase
  endtask

  // program: operands in words 0 and 1; results stored to words 2..6
  task automatic build_program();
    prog_len = 0;
    emit(i_lw(1, 0, 0));        // 0  a
    emit(i_lw(2, 4, 0));        // 1  b
    emit(i_add(4, 1, 2));       // 2
    emit(i_and(5, 1, 2));       // 3
    emit(i_or(6, 1, 2));        // 4
    emit(i_add(0, 1, 2));       // 5  write to $0, ignored
    emit(i_sw(4, 12, 0));       // 6
    emit(i_sw(5, 16, 0));       // 7
    emit(i_sw(6, 20, 0));       // 8
    emit(i_sw(0, 24, 0));       // 9  must store 0
    emit(i_beq(1, 2, 6));       // 10 loop: done when a == b
    emit(i_slt(3, 1, 2));       // 11
    emit(i_beq(3, 0, 2));       // 12 a > b -> 15
    emit(i_sub(2, 2, 1));       // 13 b -= a
    emit(i_beq(0, 0, -5));      // 14 -> 10
    emit(i_sub(1, 1, 2));       // 15 a -= b
    emit(i_beq(0, 0, -7));      // 16 -> 10
    emit(i_sw(1, 8, 0));        // 17 done: store the GCD
    emit(i_beq(0, 0, -1));      // 18 halt
  endtask

  task automatic run_pair(input int a, input int b);
    int g = euclid(a, b), n = sub_steps(a, b);
    int cyc = 0, gcd_cyc = 0, result_cycle = -1, exp_cycle;
    logic [31:0] exp_store [7];
    logic        seen [7];
    logic [7:0]  px, py;
    logic        gcd_finished = 0;
    logic [31:0] cur_pc, ir;

    exp_store[2] = 32'(g);
    exp_store[3] = 32'(a + b);
    exp_store[4] = 32'(a & b);
    exp_store[5] = 32'(a | b);
    exp_store[6] = 32'd0;
    foreach (seen[i]) seen[i] = 1'b0;
    // 10 instructions before the loop, 5 per subtraction step, then the
    // taken exit branch: the result store executes in cycle 10 + 5n + 1.
    exp_cycle = 10 + 5 * n + 1;

    rst = 1;
    for (int i = 0; i < 2**IAW; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = IAW'(i); imem_wdata = (i < prog_len) ? prog[i] : i_beq(0, 0, -1);
    end
    @(negedge clk);
    imem_we = 0;
    dut.u_cpu.u_dmem.mem[0] = 32'(a);
    dut.u_cpu.u_dmem.mem[1] = 32'(b);
    // GCD circuit: reset with the same operands in the same cycle the CPU starts
    gcd_reset = 1; gcd_x_in = 8'(a); gcd_y_in = 8'(b);
    @(negedge clk);
    rst = 0; gcd_reset = 0; gcd_x_in = 8'($urandom); gcd_y_in = 8'($urandom);
    mech[M_GCD_LOAD]++;
    checks++;
    if (gcd_x !== 8'(a) || gcd_y !== 8'(b)) begin failures++; $display("FAIL gcd load"); end

    while (cyc < exp_cycle + 20) begin
      cur_pc = pc;
      ir = prog[cur_pc[IAW+1:2]];
      if (dmem_we) begin
        int w = int'(dmem_addr >> 2);
        checks++;
        if (w < 2 || w > 6 || dmem_wdata !== exp_store[w]) begin
          failures++; $display("FAIL store word %0d data %0d", w, dmem_wdata);
        end else seen[w] = 1'b1;
        if (w == 2 && result_cycle < 0) result_cycle = cyc;
      end
      px = gcd_x; py = gcd_y;
      if (!gcd_finished && gcd_equal) begin
        gcd_finished = 1'b1;
        mech[M_GCD_DONE]++;
        checks++;
        if (gcd_x !== 8'(g) || gcd_y !== 8'(g) || gcd_cyc != n) begin
          failures++; $display("FAIL gcd circuit (%0d,%0d) -> %0d,%0d after %0d cycles, exp %0d after %0d",
                               a, b, gcd_x, gcd_y, gcd_cyc, g, n);
        end
      end
      @(negedge clk);
      count_instr(ir, cur_pc, pc);
      if (gcd_x != px) mech[M_GCD_X_STEP]++;
      if (gcd_y != py) mech[M_GCD_Y_STEP]++;
      if (!gcd_finished) gcd_cyc++;
      cyc++;
    end
    checks++;
    if (result_cycle != exp_cycle) begin
      failures++; $display("FAIL gcd(%0d,%0d) program stored the result in cycle %0d, exp %0d", a, b, result_cycle, exp_cycle);
    end
    for (int w = 2; w <= 6; w++) begin
      checks++;
      if (!seen[w]) begin failures++; $display("FAIL gcd(%0d,%0d) no store to word %0d", a, b, w); end
    end
    checks++;
    if (!gcd_finished) begin failures++; $display("FAIL gcd circuit did not finish"); end
  endtask

  initial begin
    foreach (mech[i]) mech[i] = 0;
    imem_we = 0; imem_waddr = 0; imem_wdata = 0; rst = 1;
    gcd_reset = 0; gcd_x_in = 0; gcd_y_in = 0;
    build_program();
    run_pair(12, 18);
    run_pair(200, 75);
    run_pair(17, 17);
    run_pair(1, 255);
    for (int i = 0; i < 6; i++) run_pair($urandom_range(1, 255), $urandom_range(1, 255));
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-16s happened %0d times", mech_e'(m), mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(m)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
