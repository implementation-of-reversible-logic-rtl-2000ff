// tb_qca_wire: self-checking testbench for qca_wire.
//
// Three wires are driven with independent random streams, one value per
// tick: the default (1 bit, 1 zone), a 4-bit wire over 3 zones and a 2-bit
// wire over 0 zones. After each rising edge every output must equal the
// value applied exactly ZONES ticks earlier (for 0 zones, the current
// input). A reset check confirms every zone clears to 0.
module tb_qca_wire;
  localparam int unsigned N = 300;

  logic clk = 1'b0;
  logic rst_n;
  logic       d1, q1;
  logic [3:0] d3, q3;
  logic [1:0] d0, q0;
  logic       h1 [N];
  logic [3:0] h3 [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  qca_wire                          u_w1 (.clk(clk), .rst_n(rst_n), .d(d1), .q(q1));
  qca_wire #(.WIDTH(4), .ZONES(3))  u_w3 (.clk(clk), .rst_n(rst_n), .d(d3), .q(q3));
  qca_wire #(.WIDTH(2), .ZONES(0))  u_w0 (.clk(clk), .rst_n(rst_n), .d(d0), .q(q0));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1;
    d1 = 1'b1;
    d3 = 4'hf;
    d0 = 2'b00;
    repeat (4) @(posedge clk);
    rst_n = 1'b0;
    #1;
    checks++;
    if (q1 !== 1'b0 || q3 !== 4'h0) begin
      failures++;
      $display("reset: q1=%b q3=%h, expected 0", q1, q3);
    end
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      h1[t] = 1'($urandom);
      h3[t] = 4'($urandom);
      d1 = h1[t];
      d3 = h3[t];
      d0 = 2'($urandom);
      #1;
      checks++;
      if (q0 !== d0) begin
        failures++;
        $display("t=%0d zero-zone wire q=%b, expected %b", t, q0, d0);
      end
      @(posedge clk);
      #1;
      checks++;
      if (q1 !== h1[t]) begin
        failures++;
        $display("t=%0d one-zone wire q=%b, expected %b", t, q1, h1[t]);
      end
      if (t >= 2) begin
        checks++;
        if (q3 !== h3[t-2]) begin
          failures++;
          $display("t=%0d three-zone wire q=%h, expected %h", t, q3, h3[t-2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
