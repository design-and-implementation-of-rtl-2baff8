// cmac_top - CMAC associative memory: mapping, weight memory, accumulation.
//
// The core of the CMAC card. It holds the configuration of NUM_NETS virtual
// networks and runs one command at a time on a buffered input vector:
//
//   OP_RESPOND  for each receptive field k = 0 .. C-1 the input vector is
//               replayed from the input FIFO through the associative mapper,
//               which yields the field's RAM address; the weights there are
//               read and added into the output sums. result holds the sums.
//   OP_TRAIN    the same walk, but each excited weight of each active output
//               channel gets that channel's signed adjustment (cmd_adjust)
//               added, clipped to 8 bits, and is written back. result holds
//               the sums of the weights as they were before the adjustment.
//   OP_CLEAR    writes zero to every word of the weight memory.
//
// A single mapper handles the fields one after another, and a single
// accumulator serves eight output channels in parallel. A RAM word carries
// four weights. A network with up to four outputs uses the field address as
// it is, one word per field. A network with five to eight outputs uses the
// pair of words {addr[17:1], 0} (channels 0-3) and {addr[17:1], 1} (channels
// 4-7). The hash includes the network number, so the virtual networks share
// the whole memory.
//
// Host side (in the card, the microcontroller's side):
//   cfg_we/cfg_net/cfg_data  write a network's configuration (net_cfg_t).
//   in_flush, in_we/in_data  empty the input FIFO, push input components.
//                            The FIFO is not emptied by a command, so a
//                            training step can reuse the vector that the
//                            preceding response used.
//   cmd_valid/cmd_ready      start a command (accepted when both are high);
//                            cmd_op, cmd_net and cmd_adjust are sampled then.
//   done                     one-cycle pulse when the command has finished;
//                            result is valid from then until the next command.
//
// Timing per receptive field: 1 cycle to start the field, N cycles to clock
// the N inputs, 3 cycles of mapper and FIFO latency, and 2 cycles (read, then
// accumulate or write back) per RAM word, so N + 6 cycles with up to four
// outputs and N + 8 with more. A command takes C times that plus 2 cycles
// (accept and done). OP_CLEAR takes 2^ADDR_W + 2 cycles.
//
// The structure (buffered inputs clocked through one mapping circuit, fields
// taken sequentially, one accumulator with eight channels, weight memory of
// one million 8-bit weights, up to eight virtual networks) follows the card.
// The command set, configuration encoding, memory layout and cycle-level
// schedule are this design's.
module cmac_top
  import cmac_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration
  input  logic                          cfg_we,
  input  logic [NET_W-1:0]              cfg_net,
  input  net_cfg_t                      cfg_data,
  // input vector
  input  logic                          in_flush,
  input  logic                          in_we,
  input  logic [IN_W-1:0]               in_data,
  output logic [$clog2(MAX_INPUTS+1)-1:0] in_count,
  // commands
  input  logic                          cmd_valid,
  output logic                          cmd_ready,
  input  op_e                           cmd_op,
  input  logic [NET_W-1:0]              cmd_net,
  input  logic [NUM_CH-1:0][WGT_W-1:0]  cmd_adjust,
  output logic                          done,
  output logic [NUM_CH-1:0][OUT_W-1:0]  result,
  output logic [LANES-1:0]              sat
);

  typedef enum logic [2:0] {
    S_IDLE, S_FIELD, S_STREAM, S_WAIT, S_RD, S_USE, S_CLR, S_DONE
  } state_e;

  state_e                       state;
  net_cfg_t                     cfg_tab [NUM_NETS];
  net_cfg_t                     cfg;
  op_e                          op;
  logic [NET_W-1:0]             net;
  logic [NUM_CH-1:0][WGT_W-1:0] adjust;
  logic [7:0]                   field;
  logic [8:0]                   idx;
  logic                         beat;
  logic [ADDR_W-1:0]            faddr;
  logic [ADDR_W-1:0]            clr_addr;

  // Sub-block signals.
  logic                         fifo_rewind, fifo_rd, fifo_valid;
  logic [IN_W-1:0]              fifo_data;
  logic                         rd_last, in_last_q;
  logic                         map_start, map_valid;
  logic [ADDR_W-1:0]            map_addr;
  logic                         ram_en, ram_we;
  logic [ADDR_W-1:0]            ram_addr;
  logic [WORD_W-1:0]            ram_wdata, ram_rdata;
  logic                         acc_clear, acc_en;
  logic [NUM_CH-1:0]            ch_mask;
  logic [LANES-1:0][WGT_W-1:0]  acc_wdata;
  logic                         two_beats;

  assign two_beats = cfg.n_outputs_m1 >= 3'd4;
  always_comb begin
    for (int c = 0; c < NUM_CH; c++)
      ch_mask[c] = (c <= int'(cfg.n_outputs_m1));
  end

  input_fifo #(.DEPTH(MAX_INPUTS), .WIDTH(IN_W)) u_fifo (
    .clk, .rst_n,
    .flush   (in_flush),
    .wr_en   (in_we),
    .wr_data (in_data),
    .rewind  (fifo_rewind),
    .rd_en   (fifo_rd),
    .rd_data (fifo_data),
    .rd_valid(fifo_valid),
    .count   (in_count)
  );

  // The last-component marker travels alongside the FIFO read latency.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_last_q <= 1'b0;
    else        in_last_q <= rd_last;
  end

  assoc_map u_map (
    .clk, .rst_n,
    .start     (map_start),
    .net       (net),
    .field     (field),
    .n_fields  ({1'b0, cfg.n_fields_m1} + 9'd1),
    .in_valid  (fifo_valid),
    .in_last   (in_last_q),
    .in_data   (fifo_data),
    .addr_valid(map_valid),
    .addr      (map_addr)
  );

  weight_ram #(.ADDR_W(ADDR_W), .WORD_W(WORD_W)) u_ram (
    .clk,
    .en   (ram_en),
    .we   (ram_we),
    .addr (ram_addr),
    .wdata(ram_wdata),
    .rdata(ram_rdata)
  );

  resp_accum u_acc (
    .clk, .rst_n,
    .clear  (acc_clear),
    .acc_en (acc_en),
    .group  (beat),
    .ch_mask(ch_mask),
    .rdata  (ram_rdata),
    .adjust (adjust),
    .wdata  (acc_wdata),
    .sat    (sat),
    .sums   (result)
  );

  // Address of the current word of the current field.
  logic [ADDR_W-1:0] word_addr;
  assign word_addr = two_beats ? {faddr[ADDR_W-1:1], beat} : faddr;

  // Control outputs.
  always_comb begin
    cmd_ready   = (state == S_IDLE);
    done        = (state == S_DONE);
    fifo_rewind = (state == S_FIELD);
    map_start   = (state == S_FIELD);
    fifo_rd     = (state == S_STREAM);
    rd_last     = (state == S_STREAM) && (idx == cfg.n_inputs_m1);
    acc_clear   = (state == S_IDLE) && cmd_valid;
    acc_en      = (state == S_USE) && (op != OP_CLEAR);
    ram_en      = 1'b0;
    ram_we      = 1'b0;
    ram_addr    = word_addr;
    ram_wdata   = acc_wdata;
    case (state)
      S_RD:  ram_en = 1'b1;
      S_USE: begin
        ram_en = (op == OP_TRAIN);
        ram_we = (op == OP_TRAIN);
      end
      S_CLR: begin
        ram_en    = 1'b1;
        ram_we    = 1'b1;
        ram_addr  = clr_addr;
        ram_wdata = '0;
      end
      default: ;
    endcase
  end

  // Sequencer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cfg      <= '0;
      op       <= OP_RESPOND;
      net      <= '0;
      adjust   <= '0;
      field    <= '0;
      idx      <= '0;
      beat     <= 1'b0;
      faddr    <= '0;
      clr_addr <= '0;
      for (int n = 0; n < NUM_NETS; n++) cfg_tab[n] <= '0;
    end else begin
      if (cfg_we && state == S_IDLE)
        cfg_tab[cfg_net] <= cfg_data;
      case (state)
        S_IDLE: if (cmd_valid) begin
          op       <= cmd_op;
          net      <= cmd_net;
          cfg      <= cfg_tab[cmd_net];
          adjust   <= cmd_adjust;
          field    <= '0;
          clr_addr <= '0;
          state    <= (cmd_op == OP_CLEAR) ? S_CLR : S_FIELD;
        end
        S_FIELD: begin
          idx   <= '0;
          state <= S_STREAM;
        end
        S_STREAM: begin
          idx <= idx + 1'b1;
          if (idx == cfg.n_inputs_m1) state <= S_WAIT;
        end
        S_WAIT: if (map_valid) begin
          faddr <= map_addr;
          beat  <= 1'b0;
          state <= S_RD;
        end
        S_RD: state <= S_USE;
        S_USE: begin
          if (two_beats && !beat) begin
            beat  <= 1'b1;
            state <= S_RD;
          end else if (field == cfg.n_fields_m1) begin
            state <= S_DONE;
          end else begin
            field <= field + 1'b1;
            state <= S_FIELD;
          end
        end
        S_CLR: begin
          clr_addr <= clr_addr + 1'b1;
          if (&clr_addr) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The input FIFO must hold the whole vector when a mapping command starts.
  a_enough_inputs: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_valid && cmd_ready && cmd_op != OP_CLEAR)
      |-> (in_count > {1'b0, cfg_tab[cmd_net].n_inputs_m1}));
  // A command's operands are held while it waits to be accepted.
  a_cmd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_valid && !cmd_ready) |=> (cmd_valid && $stable(cmd_op) && $stable(cmd_net)));

endmodule
