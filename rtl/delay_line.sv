// delay_line: a fixed delay of DEPTH enabled clocks, z^-DEPTH on a raster
// stream.
//
// It realises the z^-P registers between the PE0 rows and, inside PE1, the
// shift register of M-P words. It is written as a circular buffer: a
// memory of DEPTH words and one pointer. On every clock with en high the
// word at the pointer is replaced by din and the pointer moves on, so the
// word under the pointer is always the one written DEPTH enabled clocks
// earlier, and dout shows it. Nothing moves while en is low. The memory has
// no reset (it can map to RAM); instead a fill flag, set when the pointer
// wraps for the first time after reset, forces dout to zero until every word
// has been written, which matches a filter whose past inputs and outputs are
// all zero.
//
// Ports: clk, rst_n (asynchronous, active low), en, din[WIDTH],
// dout[WIDTH] (from storage only, no combinational path from din).
module delay_line #(
  parameter int unsigned WIDTH = 24,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    ptr;
  logic             filled;
  logic             wrap_now;

  assign wrap_now = (ptr == PW'(DEPTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      filled <= 1'b0;
    end else if (en) begin
      ptr <= wrap_now ? '0 : ptr + 1'b1;
      if (wrap_now) filled <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  assign dout = filled ? mem[ptr] : '0;

  initial begin
    assert (DEPTH >= 1) else $error("delay_line: DEPTH must be at least 1");
  end
endmodule
