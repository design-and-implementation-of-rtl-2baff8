// input_fifo_tb - self-checking test of the rewindable input FIFO.
//
// Fills the buffer with random vectors of random length (including the full
// 512 words and an attempt to overfill it), reads each vector out several
// times with a rewind in between, and checks data, order, the one-cycle read
// latency, the count and the flush.
module input_fifo_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        flush, wr_en, rewind, rd_en, rd_valid;
  logic [15:0] wr_data, rd_data;
  logic [9:0]  count;

  int checks = 0, failures = 0;

  input_fifo dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    flush = 0; wr_en = 0; rewind = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      logic [15:0] v [$];
      int len;
      len = (t == 0) ? 512 : 1 + int'($urandom_range(0, 99));
      v.delete();
      flush = 1'b1; @(negedge clk); flush = 1'b0;
      check(count == 0, "count after flush");
      for (int i = 0; i < len; i++) begin
        wr_en = 1'b1; wr_data = 16'($urandom); v.push_back(wr_data);
        @(negedge clk);
      end
      if (t == 0) begin
        // Buffer full: this write must be dropped.
        wr_data = 16'hDEAD; @(negedge clk);
      end
      wr_en = 1'b0;
      check(int'(count) == len, $sformatf("count %0d exp %0d", count, len));
      for (int pass = 0; pass < 3; pass++) begin
        rewind = 1'b1; @(negedge clk); rewind = 1'b0;
        check(!rd_valid, "valid without read");
        for (int i = 0; i < len; i++) begin
          rd_en = 1'b1;
          @(negedge clk);
          check(rd_valid && rd_data == v[i],
                $sformatf("t=%0d pass=%0d i=%0d got %h exp %h", t, pass, i, rd_data, v[i]));
        end
        rd_en = 1'b0;
        @(negedge clk);
        check(!rd_valid, "valid after last read");
      end
    end
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
