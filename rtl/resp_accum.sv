// resp_accum - CMAC response accumulation and weight adjustment.
//
// Holds NUM_CH signed output sums, one per output channel, all updated in
// parallel. The weight memory delivers LANES weights per word; a word belongs
// to one group of LANES channels (group selects which). On acc_en each active
// channel of that group adds its weight (signed, WGT_W bits) to its sum, so
// after all excited receptive fields have been read the sums are the network
// outputs. clear zeroes the sums before an operation.
//
// For training, wdata is the word to write back: for each active channel of
// the group the weight plus that channel's signed adjustment, clipped to the
// weight range; inactive channels keep their weight. sat flags a clipped
// lane. wdata and sat are combinational from rdata, group, ch_mask and adjust.
//
// Sums cannot overflow: 256 fields of weights in -128..127 give -32768 ..
// 32512, within 16 bits. Summing weights during response generation and
// adding the training adjustment to each addressed weight follow the card's
// description; clipping on overflow, signed weights and the word layout are
// this design's choices.
module resp_accum
  import cmac_pkg::*;
#(
  parameter int unsigned NUM_CH_P = NUM_CH,
  parameter int unsigned LANES_P  = LANES,
  localparam int unsigned GROUPS  = NUM_CH_P / LANES_P,
  localparam int unsigned GW      = (GROUPS > 1) ? $clog2(GROUPS) : 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                clear,
  input  logic                                acc_en,
  input  logic [GW-1:0]                       group,
  input  logic [NUM_CH_P-1:0]                 ch_mask,
  input  logic [LANES_P-1:0][WGT_W-1:0]       rdata,
  input  logic [NUM_CH_P-1:0][WGT_W-1:0]      adjust,
  output logic [LANES_P-1:0][WGT_W-1:0]       wdata,
  output logic [LANES_P-1:0]                  sat,
  output logic [NUM_CH_P-1:0][OUT_W-1:0]      sums
);

  localparam int signed WMAX = (1 <<< (WGT_W - 1)) - 1;
  localparam int signed WMIN = -(1 <<< (WGT_W - 1));

  // Adjusted weights for the write-back word.
  always_comb begin
    for (int l = 0; l < LANES_P; l++) begin
      int unsigned ch;
      int signed   s;
      ch = int'(group) * LANES_P + l;
      s  = int'($signed(rdata[l])) + int'($signed(adjust[ch]));
      sat[l]   = 1'b0;
      wdata[l] = rdata[l];
      if (ch_mask[ch]) begin
        if (s > WMAX) begin
          wdata[l] = WGT_W'(WMAX);
          sat[l]   = 1'b1;
        end else if (s < WMIN) begin
          wdata[l] = WGT_W'(WMIN);
          sat[l]   = 1'b1;
        end else begin
          wdata[l] = WGT_W'(s);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sums <= '0;
    end else if (clear) begin
      sums <= '0;
    end else if (acc_en) begin
      for (int l = 0; l < LANES_P; l++) begin
        if (ch_mask[int'(group) * LANES_P + l])
          sums[int'(group) * LANES_P + l] <= sums[int'(group) * LANES_P + l]
                                             + OUT_W'($signed(rdata[l]));
      end
    end
  end

endmodule
