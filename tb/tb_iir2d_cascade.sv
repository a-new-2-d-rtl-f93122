// tb_iir2d_cascade: end-to-end test of the cascade-form filter against a
// cascade of direct 2-D difference equations (iir2d_ref_pkg::cascade).
//
// Two instances: the published N = 4 (two sections) with M = 10, P = 4, and
// N = 6 (three sections) with M = 7, P = 6 = M-1. For each instance and each
// of four coefficient sets (stable IIR, stable IIR with the j = 2 column of
// the last section zeroed as for an odd order, large-coefficient IIR that
// saturates, FIR with all b = 0) a random image of 12 lines is filtered with
// en low on about a fifth of the clocks. y is checked after every enabled
// clock edge. The test counts how often each mechanism happened: stalls, 
// saturated section outputs, FIR runs, zero-column runs, and the
// section-to-section latency (y must equal the reference with exactly one
// register per section).
module tb_iir2d_cascade;
  import iir2d_pkg::*;
  import iir2d_ref_pkg::*;

  localparam int N1 = 4, NS1 = (N1 + 1) / 2, M1 = 10, P1 = 4;
  localparam int N2 = 6, NS2 = (N2 + 1) / 2, M2 = 7,  P2 = 6;
  localparam int LEN = 12 * 10;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [DATA_W-1:0] x = '0, y1, y2;
  logic signed [COEF_W-1:0] a1 [NS1][3][3], b1 [NS1][3][3];
  logic signed [COEF_W-1:0] a2 [NS2][3][3], b2 [NS2][3][3];
  int checks = 0, failures = 0;
  int n_stall = 0, n_sat = 0, n_fir = 0, n_zcol = 0, n_iir = 0, n_lat = 0;

  iir2d_cascade #(.N(N1), .M(M1), .P(P1)) u1 (.clk, .rst_n, .en, .x, .a(a1), .b(b1), .y(y1));
  iir2d_cascade #(.N(N2), .M(M2), .P(P2)) u2 (.clk, .rst_n, .en, .x, .a(a2), .b(b2), .y(y2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_coef(int mode, bit is_b);
    int one = 1 << COEF_FRAC;
    if (is_b && mode == 3) return 0;
    if (mode >= 2) return int'($signed(16'($urandom)));
    if (is_b) return $urandom_range(0, one / 9) - one / 18;
    return $urandom_range(0, one / 2) - one / 4;
  endfunction

  task automatic check(string tag, int ns, int m, int ca[], int cb[], int xs[], int ys[]);
    int v[], vs[];
    int s = 0, dummy = 0;
    cascade(ns, m, COEF_FRAC, ACC_W, DATA_W, ca, cb, xs, v, s);
    n_sat += s;
    for (int t = 0; t < xs.size(); t++) begin
      checks++;
      if (ys[t] != v[t]) begin
        failures++;
        if (failures < 10) $display("%s t=%0d got %0d exp %0d", tag, t, ys[t], v[t]);
      end
    end
    // Latency: the same stream through one register fewer must not match.
    vs = new[xs.size()];
    cascade(ns, m, COEF_FRAC, ACC_W, DATA_W, ca, cb, xs, vs, dummy);
    begin
      int same = 1;
      for (int t = 1; t < xs.size(); t++) if (ys[t] != vs[t-1]) same = 0;
      if (!same) n_lat++;
    end
  endtask

  task automatic run(int mode);
    int c1a[], c1b[], c2a[], c2b[], xs[], s1[], s2[];
    c1a = new[NS1*9]; c1b = new[NS1*9]; c2a = new[NS2*9]; c2b = new[NS2*9];
    for (int l = 0; l < NS1; l++) for (int k = 0; k < 9; k++) begin
      c1a[l*9+k] = rnd_coef(mode, 0); c1b[l*9+k] = rnd_coef(mode, 1);
      if (mode == 1 && l == NS1-1 && k % 3 == 2) begin c1a[l*9+k] = 0; c1b[l*9+k] = 0; end
      a1[l][k/3][k%3] = 16'(c1a[l*9+k]); b1[l][k/3][k%3] = 16'(c1b[l*9+k]);
    end
    for (int l = 0; l < NS2; l++) for (int k = 0; k < 9; k++) begin
      c2a[l*9+k] = rnd_coef(mode, 0); c2b[l*9+k] = rnd_coef(mode, 1);
      if (mode == 1 && l == NS2-1 && k % 3 == 2) begin c2a[l*9+k] = 0; c2b[l*9+k] = 0; end
      a2[l][k/3][k%3] = 16'(c2a[l*9+k]); b2[l][k/3][k%3] = 16'(c2b[l*9+k]);
    end
    xs = new[LEN]; s1 = new[LEN]; s2 = new[LEN];
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < LEN; ) begin
      @(negedge clk);
      x  = 16'($urandom);
      en = ($urandom_range(0, 4) != 0);
      if (en) begin
        xs[t] = int'(x);
        @(posedge clk);
        #1;
        s1[t] = int'(y1); s2[t] = int'(y2);
        t++;
      end else n_stall++;
    end
    @(negedge clk);
    en = 1'b0;
    if (mode == 1) n_zcol++;
    if (mode == 3) n_fir++; else n_iir++;
    check("N4", NS1, M1, c1a, c1b, xs, s1);
    check("N6", NS2, M2, c2a, c2b, xs, s2);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    for (int r = 0; r < 2; r++) for (int mode = 0; mode < 4; mode++) run(mode);
    $display("stalls=%0d saturated=%0d iir_runs=%0d fir_runs=%0d zero_column_runs=%0d latency_checks=%0d",
             n_stall, n_sat, n_iir, n_fir, n_zcol, n_lat);
    if (n_stall == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_fir == 0 || n_iir == 0 || n_zcol == 0) failures++;
    if (n_lat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
