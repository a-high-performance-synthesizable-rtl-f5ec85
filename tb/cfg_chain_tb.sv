// cfg_chain_tb: shifts random words into a 37-bit configuration chain, first
// bit first, and checks the parallel word, the serial output while the next
// word goes in, and that the word holds while shift_en is low.
module cfg_chain_tb;
  localparam int W = 37;

  logic clk = 0, shift_en = 0, sdi = 0, sdo;
  logic [W-1:0] cfg, word, prev;
  int checks = 0, failures = 0;

  cfg_chain #(.W(W)) dut (.clk(clk), .shift_en(shift_en), .sdi(sdi), .cfg(cfg), .sdo(sdo));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = '0;
    for (int trial = 0; trial < 20; trial++) begin
      word = W'({$urandom, $urandom});
      for (int i = W - 1; i >= 0; i--) begin
        @(negedge clk);
        shift_en = 1; sdi = word[i];
        if (trial > 0) begin
          checks++;
          if (sdo !== prev[i]) begin
            failures++;
            $display("FAIL sdo trial=%0d bit=%0d", trial, i);
          end
        end
      end
      @(negedge clk);
      shift_en = 0; sdi = 1'($urandom);
      checks++;
      if (cfg !== word) begin
        failures++;
        $display("FAIL word trial=%0d got=%h exp=%h", trial, cfg, word);
      end
      repeat (5) @(negedge clk);
      sdi = ~sdi;
      checks++;
      if (cfg !== word) begin
        failures++;
        $display("FAIL hold trial=%0d", trial);
      end
      prev = word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
