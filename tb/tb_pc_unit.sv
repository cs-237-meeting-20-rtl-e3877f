// tb_pc_unit: self-checking test of the program counter.
// Checks reset to 0, sequential stepping by 4, forward and backward taken
// branches (target = PC + 4 + offset), that en = 0 holds the PC, and random
// sequences against a model kept in the testbench.
module tb_pc_unit;
  logic        clk = 0, rst, en, take_branch;
  logic [31:0] br_offset, pc, pc_plus4, model;
  int checks = 0, failures = 0;

  pc_unit dut (.clk(clk), .rst(rst), .en(en), .take_branch(take_branch),
               .br_offset(br_offset), .pc(pc), .pc_plus4(pc_plus4));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic e, input logic tk, input logic [31:0] off);
    @(negedge clk);
    en = e; take_branch = tk; br_offset = off;
    #1;
    checks++;
    if (pc_plus4 !== model + 4) begin failures++; $display("FAIL pc_plus4 %h", pc_plus4); end
    @(posedge clk); #1;
    if (e) model = tk ? model + 4 + off : model + 4;
    checks++;
    if (pc !== model) begin failures++; $display("FAIL pc %h exp %h", pc, model); end
  endtask

  initial begin
    rst = 1; en = 1; take_branch = 0; br_offset = 0;
    @(negedge clk); @(negedge clk);
    rst = 0; en = 0; model = 0;
    checks++; if (pc !== 32'd0) begin failures++; $display("FAIL reset pc %h", pc); end
    step(1, 0, 0);               // 4
    step(1, 0, 0);               // 8
    step(1, 1, 32'd16);          // 8+4+16 = 28
    step(1, 1, -32'd12);         // 28+4-12 = 20
    step(0, 0, 0);               // hold
    step(0, 1, 32'd40);          // hold
    for (int i = 0; i < 300; i++)
      step($urandom_range(0, 3) != 0, $urandom_range(0, 1), {{14{1'b0}}, 16'($urandom), 2'b00} - 32'h0002_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
