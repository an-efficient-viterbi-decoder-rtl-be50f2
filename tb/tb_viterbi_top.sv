// tb_viterbi_top: end-to-end test of the complete decoder at its default
// parameters.
//
// A model (7,5) encoder turns random bits into symbols; a channel model
// flips code bits; the decoder's output is checked two ways:
//   1. after every clock edge decode_out must match the behavioural Viterbi
//      model (same tie rules, unbounded metrics), under sparse and dense noise;
//   2. in the phases with sparse, correctable errors bit_out must equal the
//      encoded bit TB_DEPTH symbols earlier, which checks the latency.
// It also checks that acs_en rises exactly ENABLE_DELAY edges after reset and
// counts how often each mechanism happened: start-up hold, survivor decision
// of 1, metric normalisation, trace-back from a non-zero state, corrected
// channel error, restart after reset. A mechanism that never happened counts
// as a failure.
module tb_viterbi_top;
  import viterbi_pkg::*;
  import viterbi_ref_pkg::*;
  localparam int unsigned DEPTH = 12;   // default trace-back depth of the top
  localparam int unsigned EN_DELAY = 3; // default enable delay of the top

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [1:0] rx;
  logic       acs_en, bit_out;
  state_t     decode_out;
  int checks = 0, failures = 0;
  int n_hold = 0, n_dec1 = 0, n_norm = 0, n_start_nz = 0, n_corrected = 0, n_restart = 0;
  int bits [$];
  int errs [$];
  viterbi_ref_pkg::viterbi_model model;
  viterbi_ref_pkg::conv_encoder enc;

  viterbi_top dut (
    .clk(clk), .rst_n(rst_n), .rx(rx), .acs_en(acs_en),
    .decode_out(decode_out), .bit_out(bit_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  // Releases reset and checks the start-up hold of the ACS loop.
  task automatic start_up();
    model.reset();
    enc = new();
    bits.delete();
    errs.delete();
    rx = '0;
    @(negedge clk) rst_n = 1'b1;
    for (int e = 1; e <= EN_DELAY; e++) begin
      check(acs_en == 1'b0, $sformatf("acs_en high before edge %0d", e));
      if (!acs_en) n_hold++;
      @(posedge clk);
      model.clock_rx(0);
      #1;
      check(acs_en == (e == EN_DELAY), $sformatf("acs_en=%b after edge %0d", acs_en, e));
    end
  endtask

  // n symbols; error_every = 0: no errors; k > 0: one flipped code bit every
  // k symbols; k < 0: each code bit flipped with probability 1/-k.
  task automatic run(int n, int error_every, bit check_truth);
    for (int i = 0; i < n; i++) begin
      int u, sym, noise, j, m_min_seen;
      @(negedge clk);
      u = $urandom_range(1);
      sym = enc.step(u);
      noise = 0;
      if (error_every > 0 && i % error_every == error_every / 2)
        noise = 1 << $urandom_range(1);
      else if (error_every < 0)
        for (int b = 0; b < 2; b++) if ($urandom_range(-error_every - 1) == 0) noise |= 1 << b;
      rx = 2'(sym ^ noise);
      bits.push_back(u);
      errs.push_back(noise != 0);
      #1;
      // Combinational ACS results for this symbol, sampled before the edge.
      m_min_seen = int'(dut.u_core.u5.m_min);
      if (dut.u_core.dec != '0) n_dec1++;
      if (m_min_seen != 0) n_norm++;
      @(posedge clk);
      model.clock_rx(sym ^ noise);
      #1;
      if (dut.u_core.u6.start_q != '0) n_start_nz++;
      check(int'(decode_out) == model.traced(),
            $sformatf("step %0d decode_out=%0d model=%0d", model.steps, decode_out,
                      model.traced()));
      check(model.last_min == m_min_seen,
            $sformatf("step %0d normalisation %0d, model %0d", model.steps,
                      m_min_seen, model.last_min));
      j = bits.size() - 1 - int'(DEPTH);
      if (check_truth && j >= 2 * int'(DEPTH)) begin
        check(int'(bit_out) == bits[j],
              $sformatf("symbol %0d decoded %0d, sent %0d", j, bit_out, bits[j]));
        if (errs[j] && int'(bit_out) == bits[j]) n_corrected++;
      end
    end
  endtask

  initial begin
    model = new(DEPTH, EN_DELAY);
    rx = '0;
    #12;
    start_up();
    run(200, 0, 1'b1);      // clean channel
    run(2000, 16, 1'b1);    // one error every 16 symbols
    run(2000, -12, 1'b0);   // dense random errors, model comparison only
    // Restart mid-stream.
    @(negedge clk) rst_n = 1'b0;
    #1 check(acs_en == 1'b0 && decode_out == '0, "reset did not clear the decoder");
    n_restart++;
    start_up();
    run(1000, 20, 1'b1);
    $display("COUNT start_up_hold=%0d survivor_1=%0d normalisation=%0d nonzero_start=%0d corrected=%0d restart=%0d",
             n_hold, n_dec1, n_norm, n_start_nz, n_corrected, n_restart);
    check(n_hold > 0, "start-up hold never happened");
    check(n_dec1 > 0, "no survivor decision of 1");
    check(n_norm > 0, "normalisation never happened");
    check(n_start_nz > 0, "trace-back never started from a non-zero state");
    check(n_corrected > 0, "no channel error corrected");
    check(n_restart > 0, "no restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
