// tb_dmem: self-checking test of the data memory.
// Random word writes and reads at byte addresses, compared with a shadow
// array; checks that we = 0 leaves the word unchanged, that the read port
// is combinational and that a write appears only after the clock edge.
module tb_dmem;
  localparam int AW = 8;
  logic        clk = 0, we;
  logic [31:0] addr, wd, rd;
  logic [31:0] model [2**AW];
  logic        valid [2**AW];
  int checks = 0, failures = 0;

  dmem #(.AW(AW)) dut (.clk(clk), .we(we), .addr(addr), .wd(wd), .rd(rd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    foreach (valid[i]) valid[i] = 1'b0;
    we = 0; addr = 0; wd = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      w    = $urandom_range(0, 2**AW - 1);
      addr = 32'(w * 4 + $urandom_range(0, 3));
      we   = $urandom_range(0, 1);
      wd   = $urandom;
      #1;
      if (valid[w]) begin
        checks++;
        if (rd !== model[w]) begin failures++; $display("FAIL read word %0d got %h exp %h", w, rd, model[w]); end
      end
      if (we) begin
        @(negedge clk);
        model[w] = wd; valid[w] = 1'b1;
        we = 0;
        #1;
        checks++;
        if (rd !== wd) begin failures++; $display("FAIL write word %0d got %h exp %h", w, rd, wd); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
