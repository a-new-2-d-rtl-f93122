// tb_delay_line: checks that delay_line returns every input exactly DEPTH
// enabled clocks later, holds while en is low and resets to zero. Two
// instances (DEPTH 1 and DEPTH 6) are run against a software queue.
module tb_delay_line;
  localparam int W = 12;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] din = '0, d1, d6;
  int checks = 0, failures = 0, holds = 0;
  logic [W-1:0] q1 [$], q6 [$];

  delay_line #(.WIDTH(W), .DEPTH(1)) u1 (.clk, .rst_n, .en, .din, .dout(d1));
  delay_line #(.WIDTH(W), .DEPTH(6)) u6 (.clk, .rst_n, .en, .din, .dout(d6));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1; k++) q1.push_back('0);
    for (int k = 0; k < 6; k++) q6.push_back('0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = W'($urandom);
      #1;
      checks += 2;
      if (d1 !== q1[0]) begin failures++; $display("t=%0d DEPTH1 got %h exp %h", t, d1, q1[0]); end
      if (d6 !== q6[0]) begin failures++; $display("t=%0d DEPTH6 got %h exp %h", t, d6, q6[0]); end
      if (en) begin
        void'(q1.pop_front()); q1.push_back(din);
        void'(q6.pop_front()); q6.push_back(din);
      end else holds++;
    end
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
