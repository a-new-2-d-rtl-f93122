// pe1: the shift register that joins two PE0 rows. A row's result must be
// delayed by z1^-1 z2^P, one image line minus P samples, before it is added
// to the row below, so pe1 holds DEPTH = M - P words and adds the word
// leaving it to the lower row's PE0 output:
//   out = z^-(M-P) chain_in + row_in
// The shift register and the adder follow the published PE; word size and
// wrap-around arithmetic are this design's choices.
//
// Ports: clk, rst_n (async, active low), en, chain_in (from the row above
// or the PE1 above, ACC_W), row_in (this row's PE0 output, ACC_W),
// out (ACC_W). out is combinational in row_in; chain_in goes through DEPTH
// registers that advance on clocks with en high.
module pe1
  import iir2d_pkg::*;
#(
  parameter int unsigned DEPTH = IMG_M - ADV_P,
  parameter int unsigned AW    = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [AW-1:0] chain_in,
  input  logic signed [AW-1:0] row_in,
  output logic signed [AW-1:0] out
);
  logic [AW-1:0] sr_out;

  delay_line #(.WIDTH(AW), .DEPTH(DEPTH)) u_sr (
    .clk (clk),
    .rst_n (rst_n),
    .en  (en),
    .din (chain_in),
    .dout(sr_out)
  );

  assign out = signed'(sr_out) + row_in;
endmodule
