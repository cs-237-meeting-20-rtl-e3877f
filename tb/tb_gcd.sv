// tb_gcd: self-checking test of the synchronous GCD circuit.
// For directed and random nonzero 8-bit pairs it pulses reset for one clock
// with the inputs applied, then counts clocks until 'equal'. The result in X
// and Y is compared with Euclid's algorithm computed here, and the cycle
// count with the number of subtraction steps of the same repeated-
// subtraction algorithm (one subtraction per clock). It also checks that
// X and Y hold once equal, and that on each step only the larger register
// changed.
module tb_gcd;
  logic       clk = 0, reset;
  logic [7:0] x_in, y_in, x, y;
  logic       equal;
  int checks = 0, failures = 0;

  gcd #(.W(8)) dut (.clk(clk), .reset(reset), .x_in(x_in), .y_in(y_in),
                    .x(x), .y(y), .equal(equal));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic run(input int p, input int q);
    int cycles = 0, g, n;
    logic [7:0] px, py;
    g = euclid(p, q);
    n = sub_steps(p, q);
    @(negedge clk);
    reset = 1; x_in = 8'(p); y_in = 8'(q);
    @(negedge clk);
    reset = 0; x_in = 8'($urandom); y_in = 8'($urandom);
    checks++;
    if (x !== 8'(p) || y !== 8'(q)) begin failures++; $display("FAIL load %0d %0d got %0d %0d", p, q, x, y); end
    while (!equal && cycles < 300) begin
      px = x; py = y;
      @(negedge clk);
      cycles++;
      checks++;
      if (!((px > py && x == px - py && y == py) || (py > px && y == py - px && x == px))) begin
        failures++; $display("FAIL step from %0d,%0d to %0d,%0d", px, py, x, y);
      end
    end
    checks++;
    if (x !== 8'(g) || y !== 8'(g)) begin failures++; $display("FAIL gcd(%0d,%0d) got %0d,%0d exp %0d", p, q, x, y, g); end
    checks++;
    if (cycles != n) begin failures++; $display("FAIL gcd(%0d,%0d) took %0d cycles, exp %0d", p, q, cycles, n); end
    @(negedge clk); @(negedge clk);
    checks++;
    if (x !== 8'(g) || y !== 8'(g) || !equal) begin failures++; $display("FAIL hold after done"); end
  endtask

  initial begin
    reset = 0; x_in = 0; y_in = 0;
    run(12, 18);
    run(255, 1);
    run(17, 17);
    run(64, 48);
    run(200, 75);
    for (int i = 0; i < 150; i++) run($urandom_range(1, 255), $urandom_range(1, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
