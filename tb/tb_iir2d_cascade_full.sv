// tb_iir2d_cascade_full: one complete frame through the cascade-form filter
// at its default size (N = 4, two sections, image width M = 512, P = 1).
// A random 512 x 512 image is filtered with a stable random IIR coefficient
// set, en low on about one clock in sixteen, and every one of the 262144
// outputs is compared with a cascade of direct 2-D difference equations
// (iir2d_ref_pkg::cascade). The output must also start exactly two clocks
// (one register per section) after the first sample.
module tb_iir2d_cascade_full;
  import iir2d_pkg::*;
  import iir2d_ref_pkg::*;

  localparam int NS    = 2;       // sections for the default N = 4
  localparam int WIDTH = 512;     // default image width
  localparam int LINES = 512;
  localparam int LEN   = WIDTH * LINES;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [DATA_W-1:0] x = '0, y;
  logic signed [COEF_W-1:0] a [NS][3][3], b [NS][3][3];
  int checks = 0, failures = 0, stalls = 0;

  iir2d_cascade dut (.clk, .rst_n, .en, .x, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (LEN + LEN / 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ca[], cb[], xs[], ys[], v[];
    int one = 1 << COEF_FRAC, nsat = 0, first_nz = -1;
    ca = new[NS*9]; cb = new[NS*9]; xs = new[LEN]; ys = new[LEN];
    for (int k = 0; k < NS*9; k++) begin
      ca[k] = $urandom_range(0, one / 2) - one / 4;
      cb[k] = (k % 9 == 0) ? 0 : $urandom_range(0, one / 9) - one / 18;
      a[k/9][(k%9)/3][k%3] = 16'(ca[k]);
      b[k/9][(k%9)/3][k%3] = 16'(cb[k]);
    end
    // a(0,0) of both sections non-zero so the first output is non-zero.
    ca[0] = one / 2; a[0][0][0] = 16'(one / 2);
    ca[9] = one / 2; a[1][0][0] = 16'(one / 2);
    for (int t = 0; t < LEN; t++) xs[t] = int'($signed(16'($urandom)));
    xs[0] = 1000;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < LEN; ) begin
      @(negedge clk);
      x  = 16'(xs[t]);
      en = ($urandom_range(0, 15) != 0);
      if (en) begin
        @(posedge clk);
        #1;
        ys[t] = int'(y);
        if (first_nz < 0 && y != 0) first_nz = t;
        t++;
      end else stalls++;
    end
    @(negedge clk);
    en = 1'b0;
    cascade(NS, WIDTH, COEF_FRAC, ACC_W, DATA_W, ca, cb, xs, v, nsat);
    for (int t = 0; t < LEN; t++) begin
      checks++;
      if (ys[t] != v[t]) begin
        failures++;
        if (failures < 10) $display("t=%0d got %0d exp %0d", t, ys[t], v[t]);
      end
    end
    // First sample enters section 1 at clock 0, section 2 at clock 1 and
    // leaves the output register after clock 1.
    checks++;
    if (first_nz != NS - 1) begin
      failures++;
      $display("first non-zero output after sample %0d, expected %0d", first_nz, NS - 1);
    end
    $display("frame %0dx%0d filtered, stalls=%0d saturated=%0d", WIDTH, LINES, stalls, nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
