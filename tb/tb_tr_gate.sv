// tb_tr_gate: self-checking testbench for tr_gate at its default delay.
//
// Applies a new (A, B, C) triple on every tick: first all eight, then a
// random stream. After each rising edge it compares P, Q, R with A, A xor B
// and (A and B) xor C of the triple applied DELAY ticks earlier, checking
// the function and the four-zone (one QCA clock cycle) latency. It also
// inverts the gate: A = P, B = P xor Q, C = R xor (A and B).
module tb_tr_gate;
  import qca_pkg::*;

  localparam int unsigned DELAY = TR_DELAY_ZONES;
  localparam int unsigned N     = 500;

  logic clk = 1'b0;
  logic rst_n;
  logic a, b, c, p, q, r;
  logic [2:0] hist [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tr_gate dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c),
               .p(p), .q(q), .r(r));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    {a, b, c} = 3'b000;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if ({p, q, r} !== 3'b000) begin
      failures++;
      $display("reset: pqr=%b, expected 000", {p, q, r});
    end
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      hist[t] = (t < 8) ? 3'(t) : 3'($urandom_range(0, 7));
      {a, b, c} = hist[t];
      @(posedge clk);
      #1;
      if (t + 1 >= DELAY) begin
        automatic logic ea = hist[t+1-DELAY][2];
        automatic logic eb = hist[t+1-DELAY][1];
        automatic logic ec = hist[t+1-DELAY][0];
        checks++;
        if (p !== ea || q !== (ea ^ eb) || r !== ((ea & eb) ^ ec)) begin
          failures++;
          $display("t=%0d ABC=%b%b%b: PQR=%b%b%b, expected %b%b%b", t, ea, eb, ec,
                   p, q, r, ea, ea ^ eb, (ea & eb) ^ ec);
        end
        checks++;
        if ((p ^ q) !== eb || (r ^ (p & (p ^ q))) !== ec) begin
          failures++;
          $display("t=%0d inputs not recoverable from outputs", t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
