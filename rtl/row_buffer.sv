// row_buffer: one shared row buffer of the RBS SDRAM.
//
// It holds a whole row copied out of a bank array by an activation and serves column
// bursts from it. A load (load_en) replaces the whole row with load_data. A burst write
// (wr_en) replaces BL consecutive columns starting at column wr_col. A burst read (rd_en)
// registers BL columns starting at rd_col onto rd_data, valid the clock after rd_en.
// The stored row is always visible on row_q, which the crossbar takes when the buffer is
// written back to its bank. A load and a write in the same cycle: the write wins for its
// columns (the controller never issues both).
//
// The buffer itself does not know which bank and row it holds; the controller and the
// device's command decoder keep that. Column accesses are aligned to bursts (the column
// address's low log2(BL) bits are ignored), which is this design's choice.
module row_buffer #(
  parameter int unsigned COLS = rbs_pkg::COLS,
  parameter int unsigned DQ   = rbs_pkg::DQ,
  parameter int unsigned BL   = rbs_pkg::BL,
  localparam int unsigned ROW_BITS = COLS * DQ,
  localparam int unsigned BW       = BL * DQ,          // burst width
  localparam int unsigned NBURST   = COLS / BL,
  localparam int unsigned CA_W     = $clog2(COLS)
) (
  input  logic                clk,
  input  logic                load_en,
  input  logic [ROW_BITS-1:0] load_data,
  input  logic                wr_en,
  input  logic [CA_W-1:0]     wr_col,
  input  logic [BW-1:0]       wr_data,
  input  logic                rd_en,
  input  logic [CA_W-1:0]     rd_col,
  output logic [BW-1:0]       rd_data,
  output logic [ROW_BITS-1:0] row_q
);

  localparam int unsigned BI_W = (NBURST > 1) ? $clog2(NBURST) : 1;

  logic [BI_W-1:0] wr_burst, rd_burst;
  assign wr_burst = BI_W'(wr_col / CA_W'(BL));
  assign rd_burst = BI_W'(rd_col / CA_W'(BL));

  always_ff @(posedge clk) begin
    if (load_en) row_q <= load_data;
    if (wr_en)   row_q[wr_burst*BW +: BW] <= wr_data;
    if (rd_en)   rd_data <= row_q[rd_burst*BW +: BW];
  end

endmodule
