// dram_bank_array: behavioural model of the DRAM cell array of one bank.
//
// Behavioural model: the real part is a process-specific array of DRAM cells with sense
// amplifiers, which this file stands in for; it is written as a plain memory so that the
// rest of the design can be simulated.
//
// The array only moves whole rows. An activation (act_en) reads row act_row and presents it
// on act_data one clock later. A restore (wb_en) writes wb_data into row wb_row at the clock
// edge. Sensing, charge restore and bit-line precharge times are not modelled here: the
// controller spaces commands by tRCD, tRAS and tRP, and the model is faster than any of them.
// Cells do not leak, so refresh needs nothing from the model.
//
// Defaults are the 512 Mb x4 part's bank: 16K rows of 2K 4-bit columns (8192 bits per row).
module dram_bank_array #(
  parameter int unsigned ROWS     = rbs_pkg::ROWS,
  parameter int unsigned ROW_BITS = rbs_pkg::COLS * rbs_pkg::DQ,
  localparam int unsigned RA_W    = $clog2(ROWS)
) (
  input  logic                clk,
  // activation read port
  input  logic                act_en,
  input  logic [RA_W-1:0]     act_row,
  output logic [ROW_BITS-1:0] act_data,
  // restore (write-back) port
  input  logic                wb_en,
  input  logic [RA_W-1:0]     wb_row,
  input  logic [ROW_BITS-1:0] wb_data
);

  logic [ROW_BITS-1:0] cells [ROWS];

  always_ff @(posedge clk) begin
    if (wb_en)  cells[wb_row] <= wb_data;
    if (act_en) act_data      <= cells[act_row];
  end

endmodule
