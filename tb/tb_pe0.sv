// tb_pe0: checks the row PE against the plain row equation
//   out[t] = wrap( sum_j q(a[j] x[t-j]) + q(b[j] y[t-j]) )
// (b[0] left out for a row-0 PE), with q = product >>> COEF_FRAC. Two
// instances run side by side: the published second-order PE (N = 2) and a
// fourth-order row-0 PE (N = 4, ROW0 = 1). Inputs and coefficients are
// random, en is low on about a quarter of the clocks, and out is compared
// combinationally before every clock edge, so the zero-delay tap 0 is
// checked in the same cycle.
module tb_pe0;
  import iir2d_pkg::*;
  import iir2d_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [DATA_W-1:0] x = '0, y = '0;
  logic signed [COEF_W-1:0] a2 [3], b2 [3], a4 [5], b4 [5];
  logic signed [ACC_W-1:0]  o2, o4;
  int checks = 0, failures = 0;
  int xs [$], ys [$];

  pe0 #(.N(2))              u2 (.clk, .rst_n, .en, .x, .y, .a(a2), .b(b2), .out(o2));
  pe0 #(.N(4), .ROW0(1'b1)) u4 (.clk, .rst_n, .en, .x, .y, .a(a4), .b(b4), .out(o4));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(int n, bit row0, int ca[], int cb[]);
    longint acc = 0;
    int L = xs.size();      // xs[L-1] is the current (unclocked) sample
    for (int j = 0; j <= n; j++) begin
      if (L - 1 - j >= 0) begin
        acc += q(ca[j], xs[L-1-j], COEF_FRAC);
        if (!(row0 && j == 0)) acc += q(cb[j], ys[L-1-j], COEF_FRAC);
      end
    end
    return wrap(acc, ACC_W);
  endfunction

  initial begin
    int ca2[], cb2[], ca4[], cb4[];
    ca2 = new[3]; cb2 = new[3]; ca4 = new[5]; cb4 = new[5];
    for (int j = 0; j < 3; j++) begin
      ca2[j] = int'($signed(16'($urandom))); cb2[j] = int'($signed(16'($urandom)));
      a2[j] = 16'(ca2[j]); b2[j] = 16'(cb2[j]);
    end
    for (int j = 0; j < 5; j++) begin
      ca4[j] = int'($signed(16'($urandom))); cb4[j] = int'($signed(16'($urandom)));
      a4[j] = 16'(ca4[j]); b4[j] = 16'(cb4[j]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      x  = 16'($urandom);
      y  = 16'($urandom);
      xs.push_back(int'(x)); ys.push_back(int'(y));
      #1;
      checks += 2;
      if (longint'(o2) != model(2, 1'b0, ca2, cb2)) begin
        failures++; $display("t=%0d N=2 got %0d exp %0d", t, o2, model(2, 1'b0, ca2, cb2));
      end
      if (longint'(o4) != model(4, 1'b1, ca4, cb4)) begin
        failures++; $display("t=%0d N=4 got %0d exp %0d", t, o4, model(4, 1'b1, ca4, cb4));
      end
      if (!en) begin
        void'(xs.pop_back()); void'(ys.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
