// tb_mrfi_link: sends independent random words on every band and checks
// that each band's receiver recovers its own word LATENCY clocks later.
module tb_mrfi_link;
  localparam int unsigned NB = 4, W = 16, LAT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] tx_word [NB], rx_word [NB];
  logic [NB-1:0][W-1:0] hist [$];
  logic [NB-1:0][W-1:0] cur, exp;

  mrfi_link #(.NUM_BANDS(NB), .WORD_W(W), .LATENCY(LAT)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (tx_word[k]) tx_word[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int k = 0; k < NB; k++) tx_word[k] = W'($urandom);
      // Occasionally a pattern where only one band is keyed.
      if (n % 17 == 0) for (int k = 0; k < NB; k++) tx_word[k] = (k == n % NB) ? '1 : '0;
      @(posedge clk);
      for (int k = 0; k < NB; k++) cur[k] = tx_word[k];
      hist.push_back(cur);
      #1;
      if (hist.size() >= LAT) begin
        exp = hist.pop_front();
        for (int k = 0; k < NB; k++) begin
          checks++;
          if (rx_word[k] != exp[k]) begin
            failures++; $display("FAIL: band %0d got %h exp %h", k, rx_word[k], exp[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
