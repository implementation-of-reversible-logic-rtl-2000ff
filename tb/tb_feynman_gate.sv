// tb_feynman_gate: self-checking testbench for feynman_gate at its default
// delay.
//
// Applies a new (A, B) pair on every tick: first every combination, then a
// random stream. After each rising edge it compares P and Q with A and
// A xor B of the pair applied DELAY ticks earlier, which checks the function
// and the exact two-zone latency (a wrong latency would show the result of a
// neighbouring pair). It also checks reversibility: B recovered as P xor Q.
module tb_feynman_gate;
  import qca_pkg::*;

  localparam int unsigned DELAY = FEYNMAN_DELAY_ZONES;
  localparam int unsigned N     = 400;

  logic clk = 1'b0;
  logic rst_n;
  logic a, b, p, q;
  logic [1:0] hist [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  feynman_gate dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .p(p), .q(q));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    a = 1'b0;
    b = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    if (p !== 1'b0 || q !== 1'b0) begin
      failures++;
      $display("reset: p=%b q=%b, expected 0 0", p, q);
    end
    checks++;
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      hist[t] = (t < 4) ? 2'(t) : 2'($urandom_range(0, 3));
      {a, b} = hist[t];
      @(posedge clk);
      #1;
      if (t + 1 >= DELAY) begin
        automatic logic ea = hist[t+1-DELAY][1];
        automatic logic eb = hist[t+1-DELAY][0];
        checks++;
        if (p !== ea || q !== (ea ^ eb) || (p ^ q) !== eb) begin
          failures++;
          $display("t=%0d A=%b B=%b: P=%b Q=%b, expected %b %b",
                   t, ea, eb, p, q, ea, ea ^ eb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
