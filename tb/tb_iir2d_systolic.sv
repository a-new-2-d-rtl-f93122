// tb_iir2d_systolic: compares the locally broadcast filter with the direct
// 2-D difference equation (iir2d_ref_pkg) on random raster images.
//
// Three instances cover the structure's corners: N = 2 (the published
// case) with M = 8, P = 3; N = 3 with M = 7, P = 1; N = 2 with P = M-1 = 5,
// where each PE1 shift register is a single word. Each is run in three
// coefficient sets: a stable IIR filter, an IIR filter with large
// coefficients that drives the output into saturation, and an FIR filter
// (all b = 0). y is sampled before the clock edge of the same cycle in which
// x is presented, so every check is also a check of zero latency. en is low
// on about a fifth of the clocks and the held cycles are not counted as
// samples.
module tb_iir2d_systolic;
  import iir2d_pkg::*;
  import iir2d_ref_pkg::*;

  localparam int NA = 2, MA = 8, PA = 3;
  localparam int NB = 3, MB = 7, PB = 1;
  localparam int NC = 2, MC = 6, PC = 5;
  localparam int LEN = 12 * 8;   // samples per run (at least 12 lines)

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [DATA_W-1:0] x = '0, ya, yb, yc;
  logic signed [COEF_W-1:0] aa [NA+1][NA+1], ba [NA+1][NA+1];
  logic signed [COEF_W-1:0] ab [NB+1][NB+1], bb [NB+1][NB+1];
  logic signed [COEF_W-1:0] ac [NC+1][NC+1], bc [NC+1][NC+1];
  int checks = 0, failures = 0, nsat = 0, stalls = 0;

  iir2d_systolic #(.N(NA), .M(MA), .P(PA)) ua (.clk, .rst_n, .en, .x, .a(aa), .b(ba), .y(ya));
  iir2d_systolic #(.N(NB), .M(MB), .P(PB)) ub (.clk, .rst_n, .en, .x, .a(ab), .b(bb), .y(yb));
  iir2d_systolic #(.N(NC), .M(MC), .P(PC)) uc (.clk, .rst_n, .en, .x, .a(ac), .b(bc), .y(yc));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_coef(int mode, int n, bit is_b);
    int one = 1 << COEF_FRAC;
    if (is_b && mode == 2) return 0;                         // FIR
    if (mode == 1 || mode == 2) return int'($signed(16'($urandom)));
    if (is_b) return $urandom_range(0, one / (n+1) / (n+1)) - one / (2*(n+1)*(n+1));
    return $urandom_range(0, one / 2) - one / 4;
  endfunction

  task automatic compare(string tag, int n, int m, int ca[], int cb[], int xs[], int ys[]);
    int yr[];
    int ns = 0;
    filter(n, m, COEF_FRAC, ACC_W, DATA_W, ca, cb, xs, yr, ns);
    nsat += ns;
    for (int t = 0; t < xs.size(); t++) begin
      checks++;
      if (ys[t] != yr[t]) begin
        failures++;
        if (failures < 10) $display("%s t=%0d got %0d exp %0d", tag, t, ys[t], yr[t]);
      end
    end
  endtask

  task automatic run(int mode);
    int caa[], cba[], cab[], cbb[], cac[], cbc[];
    int xs[], sa[], sb[], sc[];
    caa = new[(NA+1)*(NA+1)]; cba = new[(NA+1)*(NA+1)];
    cab = new[(NB+1)*(NB+1)]; cbb = new[(NB+1)*(NB+1)];
    cac = new[(NC+1)*(NC+1)]; cbc = new[(NC+1)*(NC+1)];
    for (int i = 0; i <= NA; i++) for (int j = 0; j <= NA; j++) begin
      caa[i*(NA+1)+j] = rnd_coef(mode, NA, 0); cba[i*(NA+1)+j] = rnd_coef(mode, NA, 1);
      aa[i][j] = 16'(caa[i*(NA+1)+j]); ba[i][j] = 16'(cba[i*(NA+1)+j]);
    end
    for (int i = 0; i <= NB; i++) for (int j = 0; j <= NB; j++) begin
      cab[i*(NB+1)+j] = rnd_coef(mode, NB, 0); cbb[i*(NB+1)+j] = rnd_coef(mode, NB, 1);
      ab[i][j] = 16'(cab[i*(NB+1)+j]); bb[i][j] = 16'(cbb[i*(NB+1)+j]);
    end
    for (int i = 0; i <= NC; i++) for (int j = 0; j <= NC; j++) begin
      cac[i*(NC+1)+j] = rnd_coef(mode, NC, 0); cbc[i*(NC+1)+j] = rnd_coef(mode, NC, 1);
      ac[i][j] = 16'(cac[i*(NC+1)+j]); bc[i][j] = 16'(cbc[i*(NC+1)+j]);
    end
    xs = new[LEN]; sa = new[LEN]; sb = new[LEN]; sc = new[LEN];
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < LEN; ) begin
      @(negedge clk);
      x  = 16'($urandom);
      en = ($urandom_range(0, 4) != 0);
      #1;
      if (en) begin
        xs[t] = int'(x); sa[t] = int'(ya); sb[t] = int'(yb); sc[t] = int'(yc);
        t++;
      end else stalls++;
    end
    @(negedge clk);
    en = 1'b0;
    compare("A", NA, MA, caa, cba, xs, sa);
    compare("B", NB, MB, cab, cbb, xs, sb);
    compare("C", NC, MC, cac, cbc, xs, sc);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    for (int r = 0; r < 3; r++) begin
      run(0);   // stable IIR
      run(1);   // large-coefficient IIR, saturating
      run(2);   // FIR
    end
    $display("saturated outputs=%0d stalled clocks=%0d", nsat, stalls);
    if (nsat == 0 || stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
