// tb_cfg_reg: checks one configuration-chain link: bits shifted in at si
// leave at so W clocks later in order, the active value q does not change
// while shifting, and a commit pulse copies exactly the shifted word to q.
module tb_cfg_reg;
  localparam int unsigned W = 12;
  logic clk = 0, rst_n = 0, shift = 0, si = 0, commit = 0;
  logic so;
  logic [W-1:0] q;
  int checks = 0, failures = 0;

  cfg_reg #(.W(W)) dut (.clk, .rst_n, .shift, .si, .so, .commit, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] word, prev;
    logic [2*W-1:0] stream;
    repeat (2) @(posedge clk);
    rst_n = 1;
    chk(q, '0, "reset q");
    prev = '0;
    for (int n = 0; n < 20; n++) begin
      word = W'($urandom);
      // shift the word LSB first; the bits of the previous word come out
      for (int t = 0; t < W; t++) begin
        @(negedge clk);
        shift = 1; si = word[t];
        checks++;
        if (so !== prev[t]) begin
          failures++;
          $display("FAIL so at bit %0d", t);
        end
        @(posedge clk); #1;
        chk(q, prev, "q held while shifting");
      end
      @(negedge clk);
      shift = 0;
      // idle clocks without shift change nothing
      repeat (2) @(posedge clk);
      @(negedge clk);
      commit = 1;
      @(posedge clk); #1;
      commit = 0;
      chk(q, word, "q after commit");
      prev = word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
