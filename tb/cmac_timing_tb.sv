// cmac_timing_tb - response and training times of the card's reference
// workload.
//
// The reference workload is a network with 32 inputs and 8 outputs, with the
// number of overlapping receptive fields swept over 8, 16, 32, 64, 128 and
// 256, all sharing the full one-million-weight memory. For each field count,
// the test runs a response, a training step and a second response on a
// random input vector, all at the design's default sizes. It checks every
// result against a reference model, which maps the inputs, keeps its own
// copy of the weights and clips training updates. It checks every command's
// cycle count against C * (32 + 4 + 2 * 2) + 1. It prints the cycle counts,
// and the clock rate at which a command would take one millisecond, which is
// the control-loop period the card was aimed at.
module cmac_timing_tb;
  import cmac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  cfg_we;
  logic [2:0]            cfg_net;
  net_cfg_t              cfg_data;
  logic                  in_flush, in_we;
  logic [15:0]           in_data;
  logic [9:0]            in_count;
  logic                  cmd_valid, cmd_ready, done;
  op_e                   cmd_op;
  logic [2:0]            cmd_net;
  logic [7:0][7:0]       cmd_adjust;
  logic [7:0][15:0]      result;
  logic [3:0]            sat;

  cmac_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [15:0] vec [32];
  logic [7:0]  wmem [int];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Reference: q = (x + k) / C, CRC-18 (x^18 + x^7 + 1) seeded by {net, k};
  // eight outputs use the word pair {addr[17:1], 0/1}.
  task automatic model(input logic [2:0] n, input int c, input bit train,
                       input logic [7:0][7:0] adj, output int sums [8]);
    foreach (sums[i]) sums[i] = 0;
    for (int k = 0; k < c; k++) begin
      logic [17:0] h;
      h = 18'({n, 8'(k)});
      foreach (vec[i]) begin
        int unsigned q;
        q = (int'(vec[i]) + k) / c;
        for (int b = 16; b >= 0; b--) begin
          logic top;
          top = h[17] ^ q[b];
          h = h << 1;
          if (top) h = h ^ 18'h00081;
        end
      end
      for (int ch = 0; ch < 8; ch++) begin
        int key, w, s;
        key = int'({h[17:1], 1'(ch / 4)}) * 4 + ch % 4;
        w   = wmem.exists(key) ? int'($signed(wmem[key])) : 0;
        sums[ch] += w;
        if (train) begin
          s = w + int'($signed(adj[ch]));
          s = (s > 127) ? 127 : (s < -128) ? -128 : s;
          wmem[key] = 8'(s);
        end
      end
    end
  endtask

  task automatic run(input op_e op, input logic [2:0] n, input logic [7:0][7:0] adj,
                     output longint lat);
    longint t0;
    @(negedge clk);
    cmd_valid = 1'b1; cmd_op = op; cmd_net = n; cmd_adjust = adj;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
  endtask

  task automatic step(input op_e op, input logic [2:0] n, input int c,
                      input logic [7:0][7:0] adj, output longint lat);
    int s [8];
    model(n, c, op == OP_TRAIN, adj, s);
    run(op, n, adj, lat);
    check(lat == longint'(c) * 40 + 1, $sformatf("C=%0d %s cycles %0d", c, op.name(), lat));
    for (int ch = 0; ch < 8; ch++)
      check(int'($signed(result[ch])) == s[ch],
            $sformatf("C=%0d %s ch%0d got %0d exp %0d", c, op.name(), ch,
                      $signed(result[ch]), s[ch]));
  endtask

  initial begin
    longint lat, lr, lt;
    int cs [6] = '{8, 16, 32, 64, 128, 256};
    cfg_we = 0; cfg_net = 0; cfg_data = '0; in_flush = 0; in_we = 0; in_data = 0;
    cmd_valid = 0; cmd_op = OP_RESPOND; cmd_net = 0; cmd_adjust = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(OP_CLEAR, 3'd0, '0, lat);
    foreach (cs[j]) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_net = 3'(j);
      cfg_data = '{n_inputs_m1: 9'd31, n_outputs_m1: 3'd7, n_fields_m1: 8'(cs[j] - 1)};
      @(negedge clk);
      cfg_we = 1'b0;
    end
    foreach (cs[j]) begin
      logic [7:0][7:0] adj;
      @(negedge clk); in_flush = 1'b1; @(negedge clk); in_flush = 1'b0;
      foreach (vec[i]) begin
        vec[i] = 16'($urandom);
        in_we = 1'b1; in_data = vec[i]; @(negedge clk);
      end
      in_we = 1'b0;
      for (int i = 0; i < 8; i++) adj[i] = 8'($urandom_range(0, 60) - 30);
      step(OP_RESPOND, 3'(j), cs[j], '0, lr);
      step(OP_TRAIN, 3'(j), cs[j], adj, lt);
      step(OP_RESPOND, 3'(j), cs[j], '0, lr);
      $display("fields=%0d respond=%0d cycles train=%0d cycles; 1 ms needs >= %0.3f MHz",
               cs[j], lr, lt, real'(lt) / 1000.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
