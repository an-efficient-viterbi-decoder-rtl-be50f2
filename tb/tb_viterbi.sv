// tb_viterbi: the decoder core driven directly with branch metrics.
//
// Branch metrics are random values 0..2 (not necessarily from one symbol),
// so the add-compare-select loop sees every combination the BMU can and some
// it cannot. After every clock edge decode_out must equal the behavioural
// model's trace-back. Run with a shorter trace-back (8) to exercise the
// depth parameter. A reset pulse in the middle checks the restart.
module tb_viterbi;
  import viterbi_pkg::*;
  import viterbi_ref_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned EN_DELAY = 3;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  bm_t    bm [NUM_STATES];
  logic   acs_en, bit_out;
  state_t decode_out;
  int checks = 0, failures = 0;
  viterbi_ref_pkg::viterbi_model model;

  viterbi #(.TB_DEPTH(DEPTH), .ENABLE_DELAY(EN_DELAY)) dut (
    .clk(clk), .rst_n(rst_n), .bm(bm), .acs_en(acs_en),
    .decode_out(decode_out), .bit_out(bit_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n);
    for (int i = 0; i < n; i++) begin
      int b [4];
      @(negedge clk);
      for (int c = 0; c < 4; c++) begin
        b[c] = $urandom_range(2);
        bm[c] = BM_W'(b[c]);
      end
      @(posedge clk);
      model.clock_bm(b);
      #1;
      checks++;
      if (int'(decode_out) != model.traced() || bit_out !== decode_out[1]) begin
        failures++;
        $display("FAIL step %0d decode_out=%0d expected %0d", model.steps, decode_out,
                 model.traced());
      end
    end
  endtask

  initial begin
    model = new(DEPTH, EN_DELAY);
    for (int c = 0; c < 4; c++) bm[c] = '0;
    #12 rst_n = 1'b1;
    run(3000);
    @(negedge clk) rst_n = 1'b0;
    model.reset();
    #2 rst_n = 1'b1;
    run(1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
