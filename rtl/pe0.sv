// pe0: one row PE of the locally broadcast 2-D filter. It computes
//   out = F(i) X + G(i) Y,  F(i) = sum_j a[j] z^-j,  G(i) = sum_j b[j] z^-j
// for one row i of the coefficient matrix, on a raster stream.
//
// How it works: instead of broadcasting X and Y to every tap and putting a
// delay between every pair of adders, one delay is moved from the adder
// chain onto both input lines. For the published second-order case (N = 2)
// tap 0 sees X and Y directly, taps 1 and 2 see X and Y delayed once, and a
// single register sits between the tap-2 adder and the tap-1 adder; tap 2
// thus sees a total delay of two and tap 1 of one. For other N this design
// repeats the same pattern every two taps (a line register before taps
// 1,3,5,..., an adder-chain register after taps 2,4,6,...), so tap j always
// sees a delay of exactly j; that generalisation is this design's choice.
//
// With ROW0 = 1 the b[0] multiplier is left out: b(0,0) is zero by
// definition and row 0 receives the filter's own output y, which must not
// loop back combinationally. b[0] is then ignored.
//
// Arithmetic: each product is the full coefficient x sample product shifted
// right by COEF_FRAC (truncation) and kept at ACC_W bits; sums wrap modulo
// 2^ACC_W. Timing: out is combinational in x (and in y when ROW0 = 0);
// everything else comes from registers that advance on clocks with en high.
// The tap-0 adder adds the tap-1 chain register before the tap-1 products, so
// a product passes through at most three adders in this cell (two in row 0,
// which has no b[0] product); the published critical period of one
// multiplier and three adders counts a balanced adder tree over the cell and
// the PE1 adder, which this written order reaches on the y path of row 0 but
// not on rows above it (one adder more before their shift register).
//
// Ports: clk, rst_n (async, active low), en, x, y (DATA_W signed),
// a[0..N], b[0..N] (COEF_W signed), out (ACC_W signed).
module pe0
  import iir2d_pkg::*;
#(
  parameter int unsigned N     = SEC_N,
  parameter bit          ROW0  = 1'b0,
  parameter int unsigned DW    = DATA_W,
  parameter int unsigned CW    = COEF_W,
  parameter int unsigned CF    = COEF_FRAC,
  parameter int unsigned AW    = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] x,
  input  logic signed [DW-1:0] y,
  input  logic signed [CW-1:0] a [N+1],
  input  logic signed [CW-1:0] b [N+1],
  output logic signed [AW-1:0] out
);
  // Number of line registers on each of the X and Y lines.
  localparam int unsigned G = (N + 1) / 2;

  function automatic logic signed [AW-1:0] mulq(input logic signed [CW-1:0] c,
                                                 input logic signed [DW-1:0] d);
    logic signed [CW+DW-1:0] full;
    full = c * d;
    return AW'(full >>> CF);
  endfunction

  // Line level g holds x and y delayed by g samples. Each level is its own
  // signal so that no false combinational loop appears through an array.
  for (genvar g = 0; g <= int'(G); g++) begin : g_line
    logic signed [DW-1:0] xq, yq;
    if (g == 0) begin : g_in
      assign xq = x;
      assign yq = y;
    end else begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          xq <= '0;
          yq <= '0;
        end else if (en) begin
          xq <= g_line[g-1].xq;
          yq <= g_line[g-1].yq;
        end
      end
    end
  end

  // Tap j: product p, adder-chain value s (tap N is the top of the chain).
  for (genvar j = 0; j <= int'(N); j++) begin : g_tap
    localparam int unsigned LV = (j + 1) / 2;   // line level seen by tap j
    logic signed [AW-1:0] p, s;
    if (ROW0 && j == 0) begin : g_nob
      assign p = mulq(a[j], g_line[LV].xq);
    end else begin : g_ab
      assign p = mulq(a[j], g_line[LV].xq) + mulq(b[j], g_line[LV].yq);
    end

    if (j == int'(N)) begin : g_top
      assign s = p;
    end else if (j % 2 == 1) begin : g_reg
      logic signed [AW-1:0] sreg;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)  sreg <= '0;
        else if (en) sreg <= g_tap[j+1].s;
      end
      assign s = p + sreg;
    end else if (j + 1 < int'(N)) begin : g_comb_r
      // Tap j+1 ends in a register: add that register to this tap's
      // products first, so the multiplier outputs of taps j and j+1 each
      // pass through only two adders before leaving (sums wrap, so the
      // order does not change the result).
      assign s = (p + g_tap[j+1].g_reg.sreg) + g_tap[j+1].p;
    end else begin : g_comb
      assign s = p + g_tap[j+1].s;
    end
  end

  assign out = g_tap[0].s;
endmodule
