// iir2d_systolic: 2-D IIR (or FIR) filter of order N x N with no globally
// broadcast signal, on a raster-scanned image of width M.
//
// It realises
//   y(n,m) = sum_{i,j=0..N} a(i,j) x(n-i,m-j) + sum_{i,j=0..N} b(i,j) y(n-i,m-j),
// with b(0,0) = 0, where n is the line and m the pixel within the line. In
// raster order z2^-1 is one sample and z1^-1 is M samples. The transfer
// function is regrouped row by row:
//   Y = [F(0)X + G(0)Y] + z1^-1 z2^P ( [F(1)X1 + G(1)Y1]
//                       + z1^-1 z2^P ( [F(2)X2 + G(2)Y2] + ... ))
// with Xk = z2^-kP X and Yk = z2^-kP Y. Hardware:
//   * N z^-P delay lines carry x up the rows and N carry y up the rows, so
//     each row PE0 (i) gets its own locally delayed copy of x and y;
//   * PE0 row i forms F(i)Xi + G(i)Yi;
//   * N PE1 blocks, each a shift register of M-P words and an adder, pass the
//     row results down, top row first, adding each row's result in turn;
//   * the last PE1 gives y, which is saturated to DATA_W bits and is both the
//     output and the feedback into the y line of row 0.
// Because b(0,0) = 0 and row 0 only feeds y through registers, y depends on
// x(n,m) combinationally: the filter has zero latency, y(n,m) is valid in
// the same clock as x(n,m). Setting every b(i,j) to zero gives the FIR filter
// of the same structure.
//
// The structure follows the published architecture. Word lengths, truncated
// products, wrap-around partial sums, output saturation, the clock enable and
// the reset values are this design's own choices.
//
// Ports: clk, rst_n (async, active low, clears all delays = zero initial
// conditions), en (one sample per clock with en high; all registers hold when
// low), x (DATA_W signed), a[i][j], b[i][j] (COEF_W signed, COEF_FRAC
// fraction bits, static while filtering; b[0][0] is ignored), y (DATA_W
// signed, combinational in x).
module iir2d_systolic
  import iir2d_pkg::*;
#(
  parameter int unsigned N  = SEC_N,
  parameter int unsigned M  = IMG_M,
  parameter int unsigned P  = ADV_P,
  parameter int unsigned DW = DATA_W,
  parameter int unsigned CW = COEF_W,
  parameter int unsigned CF = COEF_FRAC,
  parameter int unsigned AW = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] x,
  input  logic signed [CW-1:0] a [N+1][N+1],
  input  logic signed [CW-1:0] b [N+1][N+1],
  output logic signed [DW-1:0] y
);
  logic signed [AW-1:0] sum;

  // Level i of the z^-P chains: x and y delayed by i*P samples for row i.
  for (genvar i = 0; i <= int'(N); i++) begin : g_zp
    logic signed [DW-1:0] xh, yh;
    if (i == 0) begin : g_in
      assign xh = x;
      assign yh = y;
    end else begin : g_dl
      delay_line #(.WIDTH(DW), .DEPTH(P)) u_xp (
        .clk(clk), .rst_n(rst_n), .en(en), .din(g_zp[i-1].xh), .dout(xh)
      );
      delay_line #(.WIDTH(DW), .DEPTH(P)) u_yp (
        .clk(clk), .rst_n(rst_n), .en(en), .din(g_zp[i-1].yh), .dout(yh)
      );
    end
  end

  // Row PE0s: o = F(i) X_i + G(i) Y_i.
  for (genvar i = 0; i <= int'(N); i++) begin : g_row
    logic signed [AW-1:0] o;
    pe0 #(.N(N), .ROW0(i == 0), .DW(DW), .CW(CW), .CF(CF), .AW(AW)) u_pe0 (
      .clk(clk), .rst_n(rst_n), .en(en),
      .x(g_zp[i].xh), .y(g_zp[i].yh), .a(a[i]), .b(b[i]), .out(o)
    );
  end

  // PE1 chain, top row first: c(k) = z^-(M-P) c(k+1) + o(k), c(N-1) takes o(N).
  for (genvar k = 0; k < int'(N); k++) begin : g_chain
    logic signed [AW-1:0] cin, c;
    if (k == int'(N) - 1) begin : g_last
      assign cin = g_row[N].o;
    end else begin : g_mid
      assign cin = g_chain[k+1].c;
    end
    pe1 #(.DEPTH(M - P), .AW(AW)) u_pe1 (
      .clk(clk), .rst_n(rst_n), .en(en),
      .chain_in(cin), .row_in(g_row[k].o), .out(c)
    );
  end

  assign sum = g_chain[0].c;

  // Saturate the ACC_W sum to the output word.
  localparam logic signed [AW-1:0] YMAX = AW'((2 ** (DW - 1)) - 1);
  localparam logic signed [AW-1:0] YMIN = -AW'(2 ** (DW - 1));
  always_comb begin
    if (sum > YMAX)      y = YMAX[DW-1:0];
    else if (sum < YMIN) y = YMIN[DW-1:0];
    else                 y = sum[DW-1:0];
  end

  initial begin
    assert (N >= 1) else $error("iir2d_systolic: N must be at least 1");
    assert (P >= 1 && P <= M - 1) else $error("iir2d_systolic: need 1 <= P <= M-1");
  end
endmodule
