// tb_bmu: for every received symbol, bm[c] must be the number of bit
// positions where the symbol and codeword c differ.
module tb_bmu;
  import viterbi_pkg::*;
  logic [1:0] rx;
  bm_t        bm [NUM_STATES];
  int checks = 0, failures = 0;

  bmu dut (.rx(rx), .bm(bm));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx = 2'(r);
      #1;
      for (int c = 0; c < 4; c++) begin
        int hd;
        hd = ((r & 1) != (c & 1) ? 1 : 0) + ((r & 2) != (c & 2) ? 1 : 0);
        checks++;
        if (int'(bm[c]) != hd) begin
          failures++;
          $display("FAIL rx=%0d c=%0d bm=%0d expected %0d", r, c, bm[c], hd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
