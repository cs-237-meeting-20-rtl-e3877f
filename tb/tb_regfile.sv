// tb_regfile: self-checking test of the 32 x 32-bit register bank.
// After reset it checks every register reads 0, then performs random writes
// (including writes to register 0 and with we = 0) and random reads on both
// ports, comparing with a shadow array kept in the testbench. It also checks
// that a write is not visible before the clock edge.
module tb_regfile;
  logic        clk = 0, rst, we;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] wd, rd1, rd2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile #(.NREGS(32), .W(32)) dut (.clk(clk), .rst(rst), .ra1(ra1), .ra2(ra2),
    .wa(wa), .we(we), .wd(wd), .rd1(rd1), .rd2(rd2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    #1;
    checks++;
    if (rd1 !== model[ra1] || rd2 !== model[ra2]) begin
      failures++;
      $display("FAIL ra1=%0d rd1=%h exp %h ra2=%0d rd2=%h exp %h", ra1, rd1, model[ra1], ra2, rd2, model[ra2]);
    end
  endtask

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    @(negedge clk);
    rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 32; i++) begin ra1 = 5'(i); ra2 = 5'(31 - i); check_reads(); end
    for (int i = 0; i < 3000; i++) begin
      we = $urandom_range(0, 3) != 0;
      wa = 5'($urandom_range(0, 31));
      if (i % 37 == 0) wa = 5'd0;
      wd = $urandom;
      ra1 = wa; ra2 = 5'($urandom);
      check_reads();                  // before the edge: old value
      @(negedge clk);
      if (we && wa != 0) model[wa] = wd;
      ra1 = 5'($urandom); ra2 = wa;
      check_reads();                  // after the edge: new value
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
