// tb_fredkin_gate_qca: checks the clock-zoned Fredkin gate.
//
// Drives a new random input vector on every phase_clk edge and compares q, r
// with the Fredkin truth table of the vector applied four edges earlier, and
// p with the a applied one edge earlier. Then measures the latency directly:
// from all inputs 0, the vector 101 (whose q output is 1) is applied once and
// the number of edges until q rises must be exactly 4, one QCA clock cycle.
module tb_fredkin_gate_qca;
  import latch_ref_pkg::*;

  localparam int CYCLES  = 500;
  localparam int LATENCY = 4;      // four clock zones = one QCA cycle

  logic phase_clk = 1'b0;
  logic a, b, c, p, q, r;
  logic [2:0] hist [LATENCY + 1];  // hist[k]: vector applied k edges ago
  int checks = 0, failures = 0;
  int edges;

  fredkin_gate_qca dut (.phase_clk, .a, .b, .c, .p, .q, .r);

  always #5 phase_clk = ~phase_clk;

  initial begin
    repeat (CYCLES + 100) @(posedge phase_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a, b, c} = 3'b000;
    for (int i = 0; i <= LATENCY; i++) hist[i] = 3'b000;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge phase_clk);
      {a, b, c} = 3'($urandom);
      @(posedge phase_clk);
      for (int i = LATENCY; i > 0; i--) hist[i] = hist[i - 1];
      hist[0] = {a, b, c};
      #1;
      if (cyc >= LATENCY) begin
        checks++;
        if ({q, r} !== fredkin_row(hist[LATENCY - 1])[1:0]) begin
          failures++;
          $display("%t q,r = %b%b, expected %b for ABC=%b", $time, q, r,
                   fredkin_row(hist[LATENCY - 1])[1:0], hist[LATENCY - 1]);
        end
        checks++;
        if (p !== hist[0][2]) begin
          failures++;
          $display("%t p = %b, expected %b", $time, p, hist[0][2]);
        end
      end
    end

    // latency: flush with zeros, then one vector 101, count edges until q = 1
    @(negedge phase_clk);
    {a, b, c} = 3'b000;
    repeat (LATENCY + 1) @(posedge phase_clk);
    @(negedge phase_clk);
    {a, b, c} = 3'b101;
    edges = 0;
    do begin
      @(posedge phase_clk);
      @(negedge phase_clk);
      {a, b, c} = 3'b000;
      edges++;
    end while (q !== 1'b1 && edges < 10);
    checks++;
    if (edges != LATENCY) begin
      failures++;
      $display("latency %0d edges, expected %0d", edges, LATENCY);
    end
    $display("measured latency: %0d phase_clk edges", edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
