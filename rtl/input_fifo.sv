// input_fifo - buffer FIFO holding one CMAC input vector.
//
// The host pushes the components of an input vector (up to DEPTH words of
// WIDTH bits) with wr_en. The mapping sequencer then clocks them out in order,
// one per cycle, with rd_en. Because the receptive fields are processed one
// after another by a single mapping circuit, the same vector has to be read
// once per field: rewind returns the read pointer to the first component
// without losing the contents. flush empties the buffer for the next vector.
//
// Timing: rd_data and rd_valid appear on the cycle after rd_en (registered
// read, as a block RAM gives). Writes beyond DEPTH are dropped. rewind takes
// precedence over rd_en, flush over wr_en.
//
// The clocking of components from a buffer FIFO follows the card's mapping
// scheme; the rewind control and the drop-on-full rule are this design's.
module input_fifo #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned PW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rewind,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic [PW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;

  assign count = wr_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      if (flush) begin
        wr_ptr <= '0;
        rd_ptr <= '0;
      end else if (wr_en && wr_ptr < PW'(DEPTH)) begin
        wr_ptr <= wr_ptr + 1'b1;
      end
      if (!flush) begin
        if (rewind) begin
          rd_ptr <= '0;
        end else if (rd_en) begin
          rd_ptr   <= rd_ptr + 1'b1;
          rd_valid <= 1'b1;
        end
      end
    end
  end

  // Storage and registered read port.
  always_ff @(posedge clk) begin
    if (wr_en && !flush && wr_ptr < PW'(DEPTH))
      mem[wr_ptr[$clog2(DEPTH)-1:0]] <= wr_data;
    if (rd_en)
      rd_data <= mem[rd_ptr[$clog2(DEPTH)-1:0]];
  end

endmodule
