// tb_pe1: checks out = chain_in delayed by DEPTH enabled clocks + row_in,
// modulo 2^ACC_W, against a software queue, for DEPTH = 7 and for DEPTH = 1
// (the shortest shift register, P = M-1). en is low on about a quarter of
// the clocks.
module tb_pe1;
  import iir2d_pkg::*;
  import iir2d_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [ACC_W-1:0] cin = '0, rin = '0, o7, o1;
  int checks = 0, failures = 0;
  longint q7 [$], q1 [$];

  pe1 #(.DEPTH(7)) u7 (.clk, .rst_n, .en, .chain_in(cin), .row_in(rin), .out(o7));
  pe1 #(.DEPTH(1)) u1 (.clk, .rst_n, .en, .chain_in(cin), .row_in(rin), .out(o1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7) q7.push_back(0);
    q1.push_back(0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      cin = ACC_W'($urandom);
      rin = ACC_W'($urandom);
      #1;
      checks += 2;
      if (longint'(o7) != wrap(q7[0] + longint'(rin), ACC_W)) begin
        failures++; $display("t=%0d DEPTH7 got %0d", t, o7);
      end
      if (longint'(o1) != wrap(q1[0] + longint'(rin), ACC_W)) begin
        failures++; $display("t=%0d DEPTH1 got %0d", t, o1);
      end
      if (en) begin
        void'(q7.pop_front()); q7.push_back(longint'(cin));
        void'(q1.pop_front()); q1.push_back(longint'(cin));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
