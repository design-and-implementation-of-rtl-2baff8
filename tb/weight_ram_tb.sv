// weight_ram_tb - self-checking test of the weight memory at full size.
//
// Writes random words at random addresses over the whole 2^18-word space
// (including the first and last word), keeps a model in an associative
// array, reads them back in random order and checks the one-cycle read
// latency and that a write returns no data and a disabled cycle changes
// nothing.
module weight_ram_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        en, we;
  logic [17:0] addr;
  logic [31:0] wdata, rdata;

  int checks = 0, failures = 0;
  logic [31:0] model [logic [17:0]];
  logic [17:0] keys [$];

  weight_ram dut (.*);

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      logic [17:0] a;
      a = (i == 0) ? 18'h0 : (i == 1) ? 18'h3FFFF : 18'($urandom);
      if (!model.exists(a)) keys.push_back(a);
      en = 1; we = 1; addr = a; wdata = $urandom; model[a] = wdata;
      @(negedge clk);
    end
    keys.shuffle();
    foreach (keys[i]) begin
      en = 1; we = 0; addr = keys[i];
      @(negedge clk);
      checks++;
      if (rdata !== model[keys[i]]) begin
        failures++;
        $display("FAIL addr %h got %h exp %h", keys[i], rdata, model[keys[i]]);
      end
      // Disabled cycle: output holds, nothing is written.
      en = 0; we = 1; wdata = ~model[keys[i]];
      @(negedge clk);
      checks++;
      if (rdata !== model[keys[i]]) begin
        failures++;
        $display("FAIL hold at %h", keys[i]);
      end
    end
    foreach (keys[i]) begin
      en = 1; we = 0; addr = keys[i];
      @(negedge clk);
      checks++;
      if (rdata !== model[keys[i]]) begin
        failures++;
        $display("FAIL reread %h", keys[i]);
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
