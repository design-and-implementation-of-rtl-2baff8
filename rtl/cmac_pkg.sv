// cmac_pkg - sizes, types and constants shared by the CMAC associative memory.
//
// The CMAC card holds up to eight independent virtual networks sharing one
// weight memory of one million 8-bit weights. Each network has 1 to 512
// inputs of 16 bits, 1 to 8 outputs of 16 bits and 2 to 256 overlapping
// receptive fields; the mapping produces one 18-bit RAM address per field.
// Those numbers come from the card's specification. The layout of the
// weight memory (four weights per 32-bit word) and the encodings of the
// configuration record and command opcodes are choices of this design.
package cmac_pkg;

  localparam int unsigned NUM_NETS   = 8;    // virtual networks per card
  localparam int unsigned NET_W      = 3;
  localparam int unsigned MAX_INPUTS = 512;  // input components per vector
  localparam int unsigned NUM_CH     = 8;    // parallel output channels
  localparam int unsigned MAX_FIELDS = 256;  // overlapping receptive fields
  localparam int unsigned IN_W       = 16;   // input component width
  localparam int unsigned OUT_W      = 16;   // output (sum) width
  localparam int unsigned WGT_W      = 8;    // weight width
  localparam int unsigned ADDR_W     = 18;   // physical RAM address width
  localparam int unsigned LANES      = 4;    // weights per RAM word
  localparam int unsigned WORD_W     = LANES * WGT_W;

  // Configuration record of one virtual network. Each count is stored
  // minus one so that the full range fits the field.
  typedef struct packed {
    logic [8:0] n_inputs_m1;   // inputs  - 1 (0..511)
    logic [2:0] n_outputs_m1;  // outputs - 1 (0..7)
    logic [7:0] n_fields_m1;   // receptive fields - 1 (1..255 in use)
  } net_cfg_t;

  typedef enum logic [1:0] {
    OP_RESPOND = 2'd0,  // sum the weights of all excited fields
    OP_TRAIN   = 2'd1,  // add the adjustment to every excited weight
    OP_CLEAR   = 2'd2   // write zero to the whole weight memory
  } op_e;

endpackage
