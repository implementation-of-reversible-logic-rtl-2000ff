// tb_qca_reversible_top: end-to-end testbench for qca_reversible_top at its
// default parameters.
//
// All four designs are driven at once, each with its own random stream and
// a new input on every tick. After each rising edge every output group is
// compared with a reference computed here from the input applied the
// design's latency earlier (Feynman 2 zones, TR 4 zones, comparators 2 zones),
// so the function, the latency and back-to-back pipelining are all checked.
// The run then resets the design mid-stream and checks that every zone
// cleared. Coverage: every input combination of every design, each
// comparator outcome (A > B, A nor B, A < B) and the reset must each occur
// at least once; one that never occurs counts as a failure.
module tb_qca_reversible_top;
  import qca_pkg::*;

  localparam int unsigned N = 2000;

  logic clk = 1'b0;
  logic rst_n;

  logic fg_a, fg_b, tr_a, tr_b, tr_c, cmp_fg_a, cmp_fg_b, cmp_tr_a, cmp_tr_b;
  feynman_out_t fg_out;
  tr_out_t      tr_out;
  cmp_out_t     cmp_fg_out, cmp_tr_out;
  logic         cmp_tr_garbage;

  logic [1:0] h_fg  [N];
  logic [2:0] h_tr  [N];
  logic [1:0] h_cfg [N];
  logic [1:0] h_ctr [N];

  int checks = 0, failures = 0;
  int cov_fg [4], cov_tr [8], cov_cfg [4], cov_ctr [4];
  int cov_gt = 0, cov_nor = 0, cov_lt = 0, cov_reset = 0;

  always #5 clk = ~clk;

  qca_reversible_top dut (
    .clk, .rst_n,
    .fg_a, .fg_b, .fg_out,
    .tr_a, .tr_b, .tr_c, .tr_out,
    .cmp_fg_a, .cmp_fg_b, .cmp_fg_out,
    .cmp_tr_a, .cmp_tr_b, .cmp_tr_out, .cmp_tr_garbage
  );

  function automatic cmp_out_t cmp_ref(logic [1:0] ab);
    cmp_out_t e;
    e.y1 = ab[1] & ~ab[0];
    e.y2 = ~(ab[1] | ab[0]);
    e.y3 = ~ab[1] & ab[0];
    return e;
  endfunction

  task automatic check(string what, int unsigned got, int unsigned exp, int t);
    checks++;
    if (got != exp) begin
      failures++;
      $display("t=%0d %s: got %0h, expected %0h", t, what, got, exp);
    end
  endtask

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    {fg_a, fg_b, tr_a, tr_b, tr_c, cmp_fg_a, cmp_fg_b, cmp_tr_a, cmp_tr_b} = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      h_fg[t]  = 2'($urandom);
      h_tr[t]  = 3'($urandom);
      h_cfg[t] = 2'($urandom);
      h_ctr[t] = 2'($urandom);
      {fg_a, fg_b}         = h_fg[t];
      {tr_a, tr_b, tr_c}   = h_tr[t];
      {cmp_fg_a, cmp_fg_b} = h_cfg[t];
      {cmp_tr_a, cmp_tr_b} = h_ctr[t];
      @(posedge clk);
      #1;
      if (t + 1 >= FEYNMAN_DELAY_ZONES) begin
        automatic logic [1:0] in = h_fg[t+1-FEYNMAN_DELAY_ZONES];
        check("feynman", 32'(fg_out), 32'({in[1], in[1] ^ in[0]}), t);
        cov_fg[in]++;
      end
      if (t + 1 >= TR_DELAY_ZONES) begin
        automatic logic [2:0] in = h_tr[t+1-TR_DELAY_ZONES];
        check("tr", 32'(tr_out), 32'({in[2], in[2] ^ in[1], (in[2] & in[1]) ^ in[0]}), t);
        cov_tr[in]++;
      end
      if (t + 1 >= CMP_FG_DELAY_ZONES) begin
        automatic logic [1:0] in = h_cfg[t+1-CMP_FG_DELAY_ZONES];
        check("comparator_fg", 32'(cmp_fg_out), 32'(cmp_ref(in)), t);
        cov_cfg[in]++;
        cov_gt  += int'(cmp_fg_out.y1);
        cov_nor += int'(cmp_fg_out.y2);
        cov_lt  += int'(cmp_fg_out.y3);
      end
      if (t + 1 >= CMP_TR_DELAY_ZONES) begin
        automatic logic [1:0] in = h_ctr[t+1-CMP_TR_DELAY_ZONES];
        check("comparator_tr", 32'(cmp_tr_out), 32'(cmp_ref(in)), t);
        check("comparator_tr garbage", 32'(cmp_tr_garbage), 32'(in[1] & in[0]), t);
        cov_ctr[in]++;
        cov_gt  += int'(cmp_tr_out.y1);
        cov_nor += int'(cmp_tr_out.y2);
        cov_lt  += int'(cmp_tr_out.y3);
      end
    end

    // Reset in mid-stream: drive ones so that a cleared zone is visible.
    {fg_a, fg_b, tr_a, tr_b, tr_c, cmp_fg_a, cmp_fg_b, cmp_tr_a, cmp_tr_b} = '1;
    @(posedge clk);
    #1;
    rst_n = 1'b0;
    #1;
    check("reset", 32'({fg_out, tr_out, cmp_fg_out, cmp_tr_out, cmp_tr_garbage}), 32'(0), N);
    cov_reset++;
    @(posedge clk);
    #1;
    rst_n = 1'b1;

    foreach (cov_fg[i])  begin checks++; if (cov_fg[i]  == 0) begin failures++; $display("feynman input %0d never applied", i); end end
    foreach (cov_tr[i])  begin checks++; if (cov_tr[i]  == 0) begin failures++; $display("tr input %0d never applied", i); end end
    foreach (cov_cfg[i]) begin checks++; if (cov_cfg[i] == 0) begin failures++; $display("comparator_fg input %0d never applied", i); end end
    foreach (cov_ctr[i]) begin checks++; if (cov_ctr[i] == 0) begin failures++; $display("comparator_tr input %0d never applied", i); end end
    checks++;
    if (cov_gt == 0 || cov_nor == 0 || cov_lt == 0 || cov_reset == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("occurrences: A>B %0d, A nor B %0d, A<B %0d, reset %0d",
             cov_gt, cov_nor, cov_lt, cov_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
