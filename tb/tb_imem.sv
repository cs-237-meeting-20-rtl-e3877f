// tb_imem: self-checking test of the instruction memory.
// Loads every word through the load port with a value computed from its
// address, then reads them back through the byte-address fetch port
// (including unaligned low bits, which must be ignored) and compares.
module tb_imem;
  localparam int AW = 8;
  logic          clk = 0, we;
  logic [31:0]   addr, instr, wdata;
  logic [AW-1:0] waddr;
  int checks = 0, failures = 0;

  imem #(.AW(AW)) dut (.clk(clk), .addr(addr), .instr(instr), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  function automatic logic [31:0] pattern(int i);
    return 32'(i) * 32'h9E37_79B9 ^ 32'h1234_5678;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = pattern(i);
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 2**AW; i++) begin
      addr = 32'(i * 4) | 32'($urandom_range(0, 3));
      #1;
      checks++;
      if (instr !== pattern(i)) begin failures++; $display("FAIL addr %h got %h exp %h", addr, instr, pattern(i)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
