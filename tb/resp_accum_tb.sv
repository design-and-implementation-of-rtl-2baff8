// resp_accum_tb - self-checking test of the eight-channel accumulator.
//
// Feeds random weight words to both channel groups with random channel masks
// and compares the sums with a reference model, including 256 words of
// extreme weights on every channel (the worst case the sums must hold). It
// checks the training write-back word, with clipping at -128 and 127 and the
// saturation flags, against a model.
module resp_accum_tb;
  import cmac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  clear, acc_en;
  logic [0:0]            group;
  logic [7:0]            ch_mask;
  logic [3:0][7:0]       rdata, wdata;
  logic [7:0][7:0]       adjust;
  logic [3:0]            sat;
  logic [7:0][15:0]      sums;

  int checks = 0, failures = 0, n_sat = 0;
  int model [8];

  resp_accum dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic check_sums(input string what);
    for (int c = 0; c < 8; c++)
      check($signed(sums[c]) == model[c],
            $sformatf("%s ch%0d got %0d exp %0d", what, c, $signed(sums[c]), model[c]));
  endtask

  initial begin
    clear = 0; acc_en = 0; group = 0; ch_mask = 0; rdata = 0; adjust = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      int nw;
      clear = 1'b1; @(negedge clk); clear = 1'b0;
      foreach (model[c]) model[c] = 0;
      check_sums("after clear");
      ch_mask = (t < 4) ? 8'hFF : 8'($urandom);
      nw = (t < 2) ? 512 : int'($urandom_range(1, 60));
      for (int w = 0; w < nw; w++) begin
        group = 1'($urandom);
        for (int l = 0; l < 4; l++)
          rdata[l] = (t == 0) ? 8'h80 : (t == 1) ? 8'h7F : 8'($urandom);
        if (t < 2) group = 1'(w & 1);
        for (int c = 0; c < 8; c++) adjust[c] = 8'($urandom);
        #1;
        // Write-back word.
        for (int l = 0; l < 4; l++) begin
          int ch, s, e;
          bit es;
          ch = int'(group) * 4 + l;
          s  = int'($signed(rdata[l])) + int'($signed(adjust[ch]));
          e  = ch_mask[ch] ? ((s > 127) ? 127 : (s < -128) ? -128 : s) : int'($signed(rdata[l]));
          es = ch_mask[ch] && (s > 127 || s < -128);
          if (es) n_sat++;
          check($signed(wdata[l]) == e && sat[l] == es,
                $sformatf("wdata lane %0d got %0d/%0b exp %0d/%0b", l, $signed(wdata[l]),
                          sat[l], e, es));
          if (ch_mask[ch]) model[ch] += int'($signed(rdata[l]));
        end
        acc_en = 1'b1;
        @(negedge clk);
        acc_en = 1'b0;
      end
      check_sums($sformatf("t=%0d", t));
      // No update without acc_en.
      rdata = 32'h01010101;
      @(negedge clk);
      check_sums("idle");
    end
    check(n_sat > 0, "clipping never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
