// cmac_top_tb - end-to-end test of the CMAC associative memory at full size.
//
// Runs the design with its default sizes (8 networks, 512-word input FIFO,
// 2^18 words of four 8-bit weights). It clears the weight memory, configures
// several virtual networks (32 inputs / 8 outputs / 256 fields, as in the
// card's timing measurements; a 512-input network; small one-word networks)
// and runs response and training commands on random input vectors. A
// reference model computes every field's address on its own (q = (x + k)/C,
// CRC-18 with x^18 + x^7 + 1 seeded by {net, k}), keeps a copy of the weight
// memory and predicts every result and every clipped weight. Each command's
// cycle count is checked against 1 + C * (N + 4 + 2 * words per field), and
// a clear against 2^18 + 1. The test counts how often each mechanism was
// exercised (clear, response, training, one- and two-word fields, clipping,
// reuse of the buffered vector, a command held off while busy, configuration
// of several networks) and fails for any that never happened.
module cmac_top_tb;
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

  // Mechanism counters.
  int n_clear = 0, n_resp = 0, n_train = 0, n_one_word = 0, n_two_word = 0;
  int n_clip = 0, n_reuse = 0, n_held = 0, n_nets = 0;
  always @(posedge clk) if (rst_n && |sat && dut.ram_we) n_clip++;

  // Reference model state.
  net_cfg_t    mcfg [8];
  logic [15:0] vec [$];
  logic [7:0]  wmem [int];   // key: word address * 4 + lane; absent = 0

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [17:0] ref_addr(input logic [2:0] n, input int k, input int c);
    logic [17:0] h;
    h = 18'({n, 8'(k)});
    for (int i = 0; i <= int'(mcfg[n].n_inputs_m1); i++) begin
      int unsigned q;
      q = (int'(vec[i]) + k) / c;
      for (int b = 16; b >= 0; b--) begin
        logic top;
        top = h[17] ^ q[b];
        h = h << 1;
        if (top) h = h ^ 18'h00081;
      end
    end
    return h;
  endfunction

  function automatic logic [7:0] wget(input int key);
    return wmem.exists(key) ? wmem[key] : 8'h00;
  endfunction

  // Predict a command: returns the sums and updates the weight model.
  task automatic model_cmd(input op_e op, input logic [2:0] n, input logic [7:0][7:0] adj,
                           output int sums [8]);
    int c, nout;
    c    = int'(mcfg[n].n_fields_m1) + 1;
    nout = int'(mcfg[n].n_outputs_m1) + 1;
    foreach (sums[i]) sums[i] = 0;
    for (int k = 0; k < c; k++) begin
      logic [17:0] a;
      a = ref_addr(n, k, c);
      for (int ch = 0; ch < nout; ch++) begin
        int word, key, w, s;
        word = (nout > 4) ? int'({a[17:1], 1'(ch / 4)}) : int'(a);
        key  = word * 4 + (ch % 4);
        w    = int'($signed(wget(key)));
        sums[ch] += w;
        if (op == OP_TRAIN) begin
          s = w + int'($signed(adj[ch]));
          if (s > 127) s = 127;
          if (s < -128) s = -128;
          wmem[key] = 8'(s);
        end
      end
    end
  endtask

  task automatic configure(input logic [2:0] n, input int ni, input int no, input int nf);
    @(negedge clk);
    cfg_we = 1'b1; cfg_net = n;
    cfg_data.n_inputs_m1  = 9'(ni - 1);
    cfg_data.n_outputs_m1 = 3'(no - 1);
    cfg_data.n_fields_m1  = 8'(nf - 1);
    mcfg[n] = cfg_data;
    @(negedge clk);
    cfg_we = 1'b0;
    n_nets++;
  endtask

  task automatic load_vec(input int ni);
    @(negedge clk);
    in_flush = 1'b1;
    @(negedge clk);
    in_flush = 1'b0;
    vec.delete();
    for (int i = 0; i < ni; i++) begin
      in_we = 1'b1;
      in_data = 16'($urandom);
      vec.push_back(in_data);
      @(negedge clk);
    end
    in_we = 1'b0;
    @(negedge clk);
    check(int'(in_count) == ni, $sformatf("in_count %0d exp %0d", in_count, ni));
  endtask

  // Issue a command, wait for done, return the measured cycle count.
  task automatic run_cmd(input op_e op, input logic [2:0] n, input logic [7:0][7:0] adj,
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
    @(negedge clk);
  endtask

  task automatic do_cmd(input op_e op, input logic [2:0] n, input logic [7:0][7:0] adj);
    int     exp_sums [8];
    longint lat, exp_lat;
    int     c, ni, words;
    c     = int'(mcfg[n].n_fields_m1) + 1;
    ni    = int'(mcfg[n].n_inputs_m1) + 1;
    words = (mcfg[n].n_outputs_m1 >= 3'd4) ? 2 : 1;
    model_cmd(op, n, adj, exp_sums);
    run_cmd(op, n, adj, lat);
    exp_lat = longint'(c) * (ni + 4 + 2 * words) + 1;
    check(lat == exp_lat, $sformatf("%s net %0d cycles %0d exp %0d", op.name(), n, lat, exp_lat));
    for (int ch = 0; ch < 8; ch++)
      check(int'($signed(result[ch])) == exp_sums[ch],
            $sformatf("%s net %0d ch %0d got %0d exp %0d", op.name(), n, ch,
                      $signed(result[ch]), exp_sums[ch]));
    if (op == OP_TRAIN) n_train++; else n_resp++;
    if (words == 2) n_two_word += c; else n_one_word += c;
  endtask

  function automatic logic [7:0][7:0] rand_adj(input int lo, input int hi);
    logic [7:0][7:0] a;
    for (int i = 0; i < 8; i++) a[i] = 8'($urandom_range(0, hi - lo) + lo);
    return a;
  endfunction

  initial begin
    longint lat;
    cfg_we = 0; cfg_net = 0; cfg_data = '0; in_flush = 0; in_we = 0; in_data = 0;
    cmd_valid = 0; cmd_op = OP_RESPOND; cmd_net = 0; cmd_adjust = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Clear the whole weight memory.
    run_cmd(OP_CLEAR, 3'd0, '0, lat);
    check(lat == (longint'(1) << 18) + 1, $sformatf("clear cycles %0d", lat));
    n_clear++;
    wmem.delete();

    configure(3'd0, 32, 8, 256);   // the card's measured configuration
    configure(3'd1, 5, 3, 8);      // one word per field
    configure(3'd2, 512, 1, 2);    // largest input vector
    configure(3'd7, 3, 6, 2);      // two words per field, partly used

    // Net 0: respond on a cleared memory, train twice, respond again.
    load_vec(32);
    do_cmd(OP_RESPOND, 3'd0, '0);
    check(result == '0, "cleared memory gives zero response");
    do_cmd(OP_TRAIN, 3'd0, rand_adj(-20, 20));
    n_reuse++;
    do_cmd(OP_RESPOND, 3'd0, '0);
    n_reuse++;
    // Respond on a nearby input vector (one component moved by 10).
    vec[5] = vec[5] + 16'd10;
    @(negedge clk); in_flush = 1'b1; @(negedge clk); in_flush = 1'b0;
    foreach (vec[i]) begin in_we = 1'b1; in_data = vec[i]; @(negedge clk); end
    in_we = 1'b0;
    do_cmd(OP_RESPOND, 3'd0, '0);

    // Net 1: drive the weights into clipping.
    load_vec(5);
    for (int r = 0; r < 3; r++) do_cmd(OP_TRAIN, 3'd1, rand_adj(60, 127));
    do_cmd(OP_RESPOND, 3'd1, '0);
    for (int r = 0; r < 3; r++) do_cmd(OP_TRAIN, 3'd1, rand_adj(-128, -60));
    do_cmd(OP_RESPOND, 3'd1, '0);

    // Net 2 and net 7.
    load_vec(512);
    do_cmd(OP_TRAIN, 3'd2, rand_adj(-128, 127));
    do_cmd(OP_RESPOND, 3'd2, '0);
    load_vec(3);
    do_cmd(OP_TRAIN, 3'd7, rand_adj(-128, 127));
    do_cmd(OP_RESPOND, 3'd7, '0);

    // A second command presented while the first runs is held off and taken
    // on the cycle after the first one's done. It switches to another
    // network, which reads only the first 5 components of the buffered vector.
    load_vec(32);
    begin
      int     sa [8], sb [8];
      longint t_done;
      logic [7:0][7:0] adj;
      adj = rand_adj(-50, 50);
      model_cmd(OP_RESPOND, 3'd0, '0, sa);
      model_cmd(OP_TRAIN, 3'd1, adj, sb);
      @(negedge clk);
      cmd_valid = 1'b1; cmd_op = OP_RESPOND; cmd_net = 3'd0; cmd_adjust = '0;
      @(negedge clk);
      cmd_op = OP_TRAIN; cmd_net = 3'd1; cmd_adjust = adj;
      while (!done) begin
        @(negedge clk);
        if (!done && !cmd_ready) n_held++;
      end
      t_done = cyc;
      for (int ch = 0; ch < 8; ch++)
        check(int'($signed(result[ch])) == sa[ch], $sformatf("first of pair ch %0d", ch));
      @(negedge clk);
      check(cmd_ready && cmd_valid, "second command accepted right after done");
      @(negedge clk);
      cmd_valid = 1'b0;
      while (!done) @(negedge clk);
      check(cyc - t_done == 1 + 8 * (5 + 4 + 2) + 1,
            $sformatf("second of pair cycles %0d", cyc - t_done));
      for (int ch = 0; ch < 8; ch++)
        check(int'($signed(result[ch])) == sb[ch], $sformatf("second of pair ch %0d", ch));
      n_train++; n_resp++;
      @(negedge clk);
    end
    // Random mix on the small networks.
    for (int r = 0; r < 10; r++) begin
      load_vec(5);
      do_cmd(OP_TRAIN, 3'd1, rand_adj(-128, 127));
      do_cmd(OP_RESPOND, 3'd1, '0);
    end

    check(n_clear > 0,    "clear never ran");
    check(n_resp > 0,     "response never ran");
    check(n_train > 0,    "training never ran");
    check(n_one_word > 0, "one-word fields never ran");
    check(n_two_word > 0, "two-word fields never ran");
    check(n_clip > 0,     "weight clipping never happened");
    check(n_reuse > 0,    "buffered vector never reused");
    check(n_held > 0,     "busy hold never happened");
    check(n_nets > 1,     "fewer than two networks configured");
    $display("mechanisms: clear=%0d respond=%0d train=%0d one_word_fields=%0d two_word_fields=%0d clipped_writes=%0d reuse=%0d held=%0d nets=%0d",
             n_clear, n_resp, n_train, n_one_word, n_two_word, n_clip, n_reuse, n_held, n_nets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
