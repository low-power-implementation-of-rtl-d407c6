// tb_clock_gate: drives the enable at random times, also during the high
// phase of the clock, and checks that gclk rises only at clock edges where the
// enable was high before the edge, stays high for the full high phase, and
// never produces an extra edge.
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int gclk_edges = 0, expected_edges = 0;
  logic en_at_edge;

  clock_gate dut (.clk, .en, .gclk);

  always #5 clk = ~clk;

  always @(posedge gclk) gclk_edges++;
  always @(negedge gclk) begin
    checks++;
    if (clk) begin
      failures++;
      $display("FAIL gclk fell while clk was high at %0t", $time);
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // change en at random points: 1..9 time units after each rising edge
  initial begin
    for (int n = 0; n < 1000; n++) begin
      @(posedge clk);
      #(1 + ($urandom % 9));
      en = 1'($urandom % 2);
    end
  end

  always @(posedge clk) begin
    en_at_edge = en;            // value present just before this edge
    if (en_at_edge) expected_edges++;
    #1;
    checks++;
    if (gclk !== en_at_edge) begin
      failures++;
      $display("FAIL gclk=%b after edge with en=%b at %0t", gclk, en_at_edge, $time);
    end
    #3;                         // still inside the high phase
    checks++;
    if (gclk !== en_at_edge) begin
      failures++;
      $display("FAIL gclk changed inside high phase at %0t", $time);
    end
  end

  initial begin
    repeat (1010) @(posedge clk);
    #1;
    checks++;
    if (gclk_edges != expected_edges) begin
      failures++;
      $display("FAIL %0d gclk edges, expected %0d", gclk_edges, expected_edges);
    end
    $display("gated edges %0d of 1010", gclk_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
