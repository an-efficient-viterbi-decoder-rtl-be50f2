// tb_path_memory: random decision vectors and start states. A model keeps
// the history of what was clocked in and walks back TB_DEPTH steps from the
// last start state (predecessor of state s is {s[0], decision[s]}); the
// output after every edge must match. The first TB_DEPTH edges after reset
// are checked too, with the model's history cleared like the registers.
// Inputs change just after each edge, so an unregistered path would show.
module tb_path_memory;
  localparam int unsigned DEPTH = 12;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] dec_in;
  logic [1:0] start_in, decode_out;
  logic [3:0] hist [DEPTH];   // hist[0] newest
  logic [1:0] start_model;
  int checks = 0, failures = 0;

  path_memory #(.TB_DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .dec_in(dec_in), .start_in(start_in),
    .decode_out(decode_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dec_in = '0; start_in = '0;
    for (int k = 0; k < DEPTH; k++) hist[k] = '0;
    start_model = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      int st;
      @(negedge clk);
      dec_in   = 4'($urandom);
      start_in = 2'($urandom);
      @(posedge clk);
      for (int k = DEPTH - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = dec_in;
      start_model = start_in;
      #1;
      dec_in   = 4'($urandom);
      start_in = 2'($urandom);
      #1;
      st = int'(start_model);
      for (int k = 0; k < DEPTH; k++) st = (st % 2) * 2 + int'(hist[k][st]);
      checks++;
      if (int'(decode_out) != st) begin
        failures++;
        $display("FAIL cycle %0d decode_out=%0d expected %0d", n, decode_out, st);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
