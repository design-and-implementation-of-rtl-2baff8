// assoc_map_tb - self-checking test of the CMAC associative mapper.
//
// Streams random input vectors (random length, network, field and field
// count) through the mapper and compares each address with a reference
// model: q = (x + k) / C per component, folded MSB first into an 18-bit CRC
// with generator x^18 + x^7 + 1, starting from {net, k}. Also checks that the
// address pulse comes exactly two cycles after the last component, and that
// two vectors differing by less than C in one component share at least one
// field's address (the CMAC generalization property).
module assoc_map_tb;
  import cmac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start, in_valid, in_last, addr_valid;
  logic [2:0]       net;
  logic [7:0]       field;
  logic [8:0]       n_fields;
  logic [15:0]      in_data;
  logic [17:0]      addr;

  int checks = 0, failures = 0;

  assoc_map dut (.*);

  function automatic logic [17:0] ref_addr(input logic [2:0] n, input int k, input int c,
                                           input logic [15:0] v [], input int len);
    logic [17:0] h;
    h = 18'({n, 8'(k)});
    for (int i = 0; i < len; i++) begin
      int unsigned q;
      q = (int'(v[i]) + k) / c;
      for (int b = 16; b >= 0; b--) begin
        logic top;
        top = h[17] ^ q[b];
        h = h << 1;
        if (top) h = h ^ 18'h00081;
      end
    end
    return h;
  endfunction

  task automatic map_vec(input logic [2:0] n, input int k, input int c,
                         input logic [15:0] v [], input int len, output logic [17:0] a,
                         output int lat);
    @(negedge clk);
    start = 1'b1; net = n; field = 8'(k); n_fields = 9'(c);
    @(negedge clk);
    start = 1'b0;
    for (int i = 0; i < len; i++) begin
      in_valid = 1'b1; in_data = v[i]; in_last = (i == len - 1);
      @(negedge clk);
    end
    in_valid = 1'b0; in_last = 1'b0;
    lat = 1;
    while (!addr_valid) begin
      @(negedge clk);
      lat++;
      if (lat > 10) break;
    end
    a = addr;
  endtask

  initial begin
    start = 0; in_valid = 0; in_last = 0; net = 0; field = 0; n_fields = 1; in_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      logic [15:0] v [];
      int len, c, k, lat;
      logic [2:0] n;
      logic [17:0] a, e;
      len = 1 + int'($urandom_range(0, 39));
      if (t < 5) len = 512 - t;
      c = 2 + int'($urandom_range(0, 254));
      k = int'($urandom_range(0, c - 1));
      n = 3'($urandom);
      v = new[len];
      foreach (v[i]) v[i] = 16'($urandom);
      if (t == 6) foreach (v[i]) v[i] = 16'hFFFF;
      if (t == 7) begin c = 256; k = 255; end
      map_vec(n, k, c, v, len, a, lat);
      e = ref_addr(n, k, c, v, len);
      checks++;
      if (a !== e) begin
        failures++;
        $display("FAIL addr t=%0d len=%0d c=%0d k=%0d got %h exp %h", t, len, c, k, a, e);
      end
      // The pulse must come two cycles after the last component (the first
      // negedge after the last component counts as one).
      checks++;
      if (lat != 2) begin
        failures++;
        $display("FAIL latency t=%0d lat=%0d", t, lat);
      end
    end
    // Generalization: a small change of one component keeps most fields.
    begin
      logic [15:0] v1 [], v2 [];
      logic [17:0] a1, a2;
      int lat, shared;
      v1 = new[8]; v2 = new[8];
      foreach (v1[i]) begin v1[i] = 16'($urandom_range(0, 60000)); v2[i] = v1[i]; end
      v2[3] = v1[3] + 16'd3;
      shared = 0;
      for (int k = 0; k < 16; k++) begin
        map_vec(3'd1, k, 16, v1, 8, a1, lat);
        map_vec(3'd1, k, 16, v2, 8, a2, lat);
        if (a1 == a2) shared++;
      end
      checks++;
      if (shared != 13) begin
        failures++;
        $display("FAIL generalization shared=%0d exp 13", shared);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
