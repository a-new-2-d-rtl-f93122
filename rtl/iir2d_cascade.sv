// iir2d_cascade: 2-D IIR filter of order N x N in cascade form, built from
// NS = floor((N+1)/2) second-order (2 x 2) sections,
//   H(z1,z2) = prod_{l=1..NS} A_l(z1,z2) / (1 - B_l(z1,z2)),
// each section being the locally broadcast systolic filter (iir2d_systolic
// with order 2: three PE0 rows, two PE1 shift-register/adder blocks and four
// z^-P delay lines). Cascading second-order sections is the usual way to
// lower the sensitivity to coefficient quantisation and the roundoff noise
// compared with one direct-form filter of the full order.
//
// Each section's output goes through one register (z^-1) before it enters
// the next section, and the last section's output through one register
// before it leaves, so the pipeline between any two sections stays at one
// multiplier and a few adders; y is therefore the filtered value of the
// sample presented NS enabled clocks earlier. Every signal is passed only
// between neighbouring blocks: nothing is broadcast. With N = 4 there are
// two sections. For an odd N the last section's j = 2 column (and its b
// counterpart) is simply set to zero through the coefficient ports.
//
// Structure and section count follow the published cascade form; word
// lengths, the clock enable, reset and the per-section output saturation are
// this design's own choices.
//
// Ports: clk, rst_n (async, active low, all delays to zero), en (one sample
// per clock with en high, everything holds when low), x (DATA_W signed),
// a[l][i][j], b[l][i][j] (section l, COEF_W signed with COEF_FRAC fraction
// bits, static while filtering, b[l][0][0] ignored), y (DATA_W signed,
// registered).
module iir2d_cascade
  import iir2d_pkg::*;
#(
  parameter int unsigned N  = 4,
  parameter int unsigned NS = (N + 1) / 2,
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
  input  logic signed [CW-1:0] a [NS][SEC_N+1][SEC_N+1],
  input  logic signed [CW-1:0] b [NS][SEC_N+1][SEC_N+1],
  output logic signed [DW-1:0] y
);
  for (genvar l = 0; l < int'(NS); l++) begin : g_sec
    logic signed [DW-1:0] sin, sout, sreg;
    if (l == 0) begin : g_first
      assign sin = x;
    end else begin : g_next
      assign sin = g_sec[l-1].sreg;
    end

    iir2d_systolic #(
      .N(SEC_N), .M(M), .P(P), .DW(DW), .CW(CW), .CF(CF), .AW(AW)
    ) u_sec (
      .clk(clk), .rst_n(rst_n), .en(en),
      .x(sin), .a(a[l]), .b(b[l]), .y(sout)
    );

    // Inter-section (and output) register z^-1.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  sreg <= '0;
      else if (en) sreg <= sout;
    end
  end

  assign y = g_sec[NS-1].sreg;

  initial begin
    assert (NS >= 1) else $error("iir2d_cascade: need at least one section");
  end
endmodule
