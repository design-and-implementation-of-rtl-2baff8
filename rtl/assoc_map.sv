// assoc_map - CMAC associative mapping: input vector to one RAM address.
//
// For one receptive field k of a network with C overlapping fields, every
// input component x (unsigned) is quantized as q = (x + k) / C, so the C fields are
// tilings of the input space displaced from one another by one input unit
// each: an input vector excites exactly one cell in each field, and nearby
// vectors share most of their cells. The cell "address" (the field number,
// the network number and the quantized components) is far too wide for a
// RAM, so it is hashed to ADDR_W bits while it is formed: the components are
// clocked in one per cycle and each is folded into a running CRC register,
// bit by bit, with the generator polynomial POLY (default x^18 + x^7 + 1).
// The register starts from a seed made of the network and field numbers.
//
// Pipeline: stage 1 registers the quantized component, stage 2 folds it into
// the hash. start loads the field, the field count and the seed; it must come
// at least one cycle before the first in_valid of that field. addr_valid is a
// one-cycle pulse, two cycles after the in_valid marked in_last, with the
// field's address on addr (addr holds until the next start).
//
// The recursive formation of the address from sequentially clocked
// components, the pipelined hashing and the 18-bit address follow the card's
// description. The quantization formula, the CRC hash and the seed are this
// design's choices.
module assoc_map
  import cmac_pkg::*;
#(
  parameter int unsigned           IN_W_P   = IN_W,
  parameter int unsigned           ADDR_W_P = ADDR_W,
  parameter logic [ADDR_W_P-1:0]   POLY     = ADDR_W_P'(18'h00081)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [NET_W-1:0]      net,
  input  logic [7:0]            field,     // k, 0 .. C-1
  input  logic [8:0]            n_fields,  // C, 1 .. 256
  input  logic                  in_valid,
  input  logic                  in_last,
  input  logic [IN_W_P-1:0]     in_data,
  output logic                  addr_valid,
  output logic [ADDR_W_P-1:0]   addr
);

  logic [7:0]          field_r;
  logic [8:0]          c_r;
  logic [IN_W_P:0]     q_r;
  logic                v1, last1;
  logic [ADDR_W_P-1:0] h, h_next;

  // Stage 1: offset and quantize.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      field_r <= '0;
      c_r     <= 9'd1;
      q_r     <= '0;
      v1      <= 1'b0;
      last1   <= 1'b0;
    end else begin
      if (start) begin
        field_r <= field;
        c_r     <= (n_fields == '0) ? 9'd1 : n_fields;
      end
      v1    <= in_valid;
      last1 <= in_valid & in_last;
      if (in_valid)
        q_r <= ({1'b0, in_data} + (IN_W_P + 1)'(field_r)) / (IN_W_P + 1)'(c_r);
    end
  end

  // Fold the quantized component into the CRC, most significant bit first.
  always_comb begin
    logic fb;
    h_next = h;
    for (int b = IN_W_P; b >= 0; b--) begin
      fb     = h_next[ADDR_W_P-1] ^ q_r[b];
      h_next = {h_next[ADDR_W_P-2:0], 1'b0} ^ (fb ? POLY : '0);
    end
  end

  // Stage 2: hash register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h          <= '0;
      addr_valid <= 1'b0;
    end else begin
      addr_valid <= v1 & last1;
      if (start)
        h <= ADDR_W_P'({net, field});
      else if (v1)
        h <= h_next;
    end
  end

  assign addr = h;

  // A field's start must not cut into the previous field's pipeline.
  a_start_clear: assert property (@(posedge clk) disable iff (!rst_n) start |-> !v1);

endmodule
