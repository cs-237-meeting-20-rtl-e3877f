// tb_en_reg: self-checking test of the register with enable.
// Drives random data with random enable and reset and checks on every clock
// that q holds when en = 0, loads d when en = 1, and clears on rst, against
// a model value kept in the testbench.
module tb_en_reg;
  logic       clk = 0, rst, en;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  en_reg #(.W(8)) dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; d = 8'h5A;
    @(posedge clk); #1;
    model = 8'h00;
    checks++; if (q !== model) begin failures++; $display("FAIL reset q=%h", q); end
    for (int i = 0; i < 500; i++) begin
      rst = ($urandom_range(0, 15) == 0);
      en  = $urandom_range(0, 1);
      d   = 8'($urandom);
      @(posedge clk); #1;
      if (rst) model = 8'h00;
      else if (en) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL cycle %0d q=%h exp %h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
