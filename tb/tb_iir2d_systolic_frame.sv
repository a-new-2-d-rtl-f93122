// tb_iir2d_systolic_frame: frame-size runs of the single second-order
// locally broadcast filter at its default size (N = 2, M = 512, P = 1), plus
// the same filter with a large advance P = 300, on 512 x 512 random images.
// Each instance filters one image as a stable IIR filter and one as an FIR
// filter (all b = 0). Every output is taken in the same clock as its input
// (zero latency) and compared with the direct 2-D difference equation.
module tb_iir2d_systolic_frame;
  import iir2d_pkg::*;
  import iir2d_ref_pkg::*;

  localparam int NN = 2, WIDTH = 512, LINES = 512, LEN = WIDTH * LINES;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [DATA_W-1:0] x = '0, y1, y2;
  logic signed [COEF_W-1:0] a [NN+1][NN+1], b [NN+1][NN+1];
  int checks = 0, failures = 0, runs_iir = 0, runs_fir = 0;

  iir2d_systolic                u1 (.clk, .rst_n, .en, .x, .a, .b, .y(y1));
  iir2d_systolic #(.P(300))     u2 (.clk, .rst_n, .en, .x, .a, .b, .y(y2));

  always #5 clk = ~clk;

  initial begin
    repeat (3 * LEN) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit fir);
    int ca[], cb[], xs[], s1[], s2[], yr[];
    int one = 1 << COEF_FRAC, ns = 0;
    ca = new[9]; cb = new[9]; xs = new[LEN]; s1 = new[LEN]; s2 = new[LEN];
    for (int k = 0; k < 9; k++) begin
      ca[k] = $urandom_range(0, one / 2) - one / 4;
      cb[k] = (fir || k == 0) ? 0 : $urandom_range(0, one / 9) - one / 18;
      a[k/3][k%3] = 16'(ca[k]);
      b[k/3][k%3] = 16'(cb[k]);
    end
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < LEN; t++) begin
      @(negedge clk);
      en = 1'b1;
      x  = 16'($urandom);
      #1;
      xs[t] = int'(x); s1[t] = int'(y1); s2[t] = int'(y2);
    end
    @(negedge clk);
    en = 1'b0;
    filter(NN, WIDTH, COEF_FRAC, ACC_W, DATA_W, ca, cb, xs, yr, ns);
    for (int t = 0; t < LEN; t++) begin
      checks += 2;
      if (s1[t] != yr[t]) begin
        failures++;
        if (failures < 10) $display("P=1 t=%0d got %0d exp %0d", t, s1[t], yr[t]);
      end
      if (s2[t] != yr[t]) begin
        failures++;
        if (failures < 10) $display("P=300 t=%0d got %0d exp %0d", t, s2[t], yr[t]);
      end
    end
    if (fir) runs_fir++; else runs_iir++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    run(1'b0);
    run(1'b1);
    if (runs_iir == 0 || runs_fir == 0) failures++;
    $display("iir frames=%0d fir frames=%0d", runs_iir, runs_fir);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
