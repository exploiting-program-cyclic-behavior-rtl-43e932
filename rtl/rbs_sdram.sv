// rbs_sdram: DDR2 SDRAM device with row buffer sharing (RBS).
//
// A conventional DDR2 part gives each of its four banks one row buffer. In this device the
// NBUFS row buffers form a shared pool: an activation names both the bank/row to open and
// the buffer to put it in, so one busy bank may keep several rows open at once while the
// other banks are idle. A crossbar (rbs_crossbar) connects banks and buffers; a column
// multiplexer connects the addressed buffer to the data pins.
//
// Commands (rbs_pkg::ddr_cmd_t, sampled at the rising clock edge):
//   ACT   bank,row,buf_id  array read at edge t, crossbar at t+1, buffer loaded at t+2.
//   READ  buf_id,col       BL columns; rdata_valid/rdata appear CL cycles after the cycle
//                          that carried READ.
//   WRITE buf_id,col,wdata BL columns written into the buffer at the sampling edge
//                          (write data travels with the command: a simplification).
//   PRE   buf_id           the buffer is written back, through the crossbar, into the bank
//                          and row it was loaded from; array written at edge t+1.
//   REF   -                accepted; the behavioural arrays do not leak.
// The device records which bank and row each buffer holds, since PRE names only the buffer.
// It does not check DDR2 timing; the controller keeps tRCD, tRAS, tRP, tCCD and tWTR, which
// cover the internal pipeline above. Data is handled one burst (BL x DQ bits) per word; the
// two-edges-per-clock transfer of the pins is not modelled.
//
// Following the document: shared buffers, crossbar with one memory-cycle delay, column
// selection of one buffer. This design's choices: the buffer index in the command, the
// write-back-on-PRE-only rule for buffers (a clean buffer is simply reloaded) and the
// pipeline above.
module rbs_sdram
  import rbs_pkg::*;
#(
  parameter int unsigned NBANKS = NUM_BANKS,
  parameter int unsigned NBUFS  = NUM_BUFS,
  parameter int unsigned ROWS_P = ROWS,
  parameter int unsigned COLS_P = COLS,
  parameter int unsigned DQ_P   = DQ,
  parameter int unsigned BL_P   = BL,
  parameter int unsigned CL_P   = CL,
  localparam int unsigned ROW_BITS = COLS_P * DQ_P,
  localparam int unsigned BW       = BL_P * DQ_P,
  localparam int unsigned RA_W     = $clog2(ROWS_P),
  localparam int unsigned CA_W     = $clog2(COLS_P),
  localparam int unsigned BA_W     = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  localparam int unsigned BF_W     = (NBUFS  > 1) ? $clog2(NBUFS)  : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ddr_cmd_t      cmd,
  input  logic [BW-1:0] wdata,
  output logic [BW-1:0] rdata,
  output logic          rdata_valid
);

  // ------------------------------------------------------------ buffer ownership
  logic            buf_open [NBUFS];
  logic [BA_W-1:0] buf_bank [NBUFS];
  logic [RA_W-1:0] buf_rowa [NBUFS];

  wire [BF_W-1:0] cmd_buf  = cmd.buf_id[BF_W-1:0];
  wire [BA_W-1:0] cmd_bank = cmd.bank[BA_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NBUFS; k++) buf_open[k] <= 1'b0;
    end else if (cmd.op == CMD_ACT) begin
      buf_open[cmd_buf] <= 1'b1;
      buf_bank[cmd_buf] <= cmd_bank;
      buf_rowa[cmd_buf] <= cmd.row[RA_W-1:0];
    end
  end

  // ------------------------------------------------------------ bank arrays
  logic [ROW_BITS-1:0] bank_row     [NBANKS];
  logic                bank_wb_en   [NBANKS];
  logic [ROW_BITS-1:0] bank_wb_data [NBANKS];
  logic [RA_W-1:0]     wb_row_q     [NBANKS];   // row address travelling with the write-back

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    logic act_here;
    assign act_here = (cmd.op == CMD_ACT) && (cmd_bank == BA_W'(b));

    always_ff @(posedge clk)
      if (cmd.op == CMD_PRE && buf_bank[cmd_buf] == BA_W'(b))
        wb_row_q[b] <= buf_rowa[cmd_buf];

    dram_bank_array #(.ROWS(ROWS_P), .ROW_BITS(ROW_BITS)) u_array (
      .clk     (clk),
      .act_en  (act_here),
      .act_row (cmd.row[RA_W-1:0]),
      .act_data(bank_row[b]),
      .wb_en   (bank_wb_en[b]),
      .wb_row  (wb_row_q[b]),
      .wb_data (bank_wb_data[b])
    );
  end

  // ------------------------------------------------------------ crossbar
  // ACT is delayed one cycle so the crossbar takes the array's registered row.
  logic            act_d1;
  logic [BA_W-1:0] act_bank_d1;
  logic [BF_W-1:0] act_buf_d1;

  always_ff @(posedge clk) begin
    if (!rst_n) act_d1 <= 1'b0;
    else        act_d1 <= (cmd.op == CMD_ACT);
    act_bank_d1 <= cmd_bank;
    act_buf_d1  <= cmd_buf;
  end

  logic                xb_ld_en    [NBUFS];
  logic [BA_W-1:0]     xb_ld_bank  [NBUFS];
  logic                buf_ld_en   [NBUFS];
  logic [ROW_BITS-1:0] buf_ld_data [NBUFS];
  logic [ROW_BITS-1:0] buf_row     [NBUFS];
  logic                xb_wb_en    [NBANKS];
  logic [BF_W-1:0]     xb_wb_buf   [NBANKS];

  always_comb begin
    for (int k = 0; k < NBUFS; k++) begin
      xb_ld_en[k]   = act_d1 && (act_buf_d1 == BF_W'(k));
      xb_ld_bank[k] = act_bank_d1;
    end
    for (int b = 0; b < NBANKS; b++) begin
      xb_wb_en[b]  = (cmd.op == CMD_PRE) && (buf_bank[cmd_buf] == BA_W'(b));
      xb_wb_buf[b] = cmd_buf;
    end
  end

  rbs_crossbar #(.NBANKS(NBANKS), .NBUFS(NBUFS), .ROW_BITS(ROW_BITS)) u_xbar (
    .clk         (clk),
    .rst_n       (rst_n),
    .bank_row    (bank_row),
    .ld_en       (xb_ld_en),
    .ld_bank     (xb_ld_bank),
    .buf_ld_en   (buf_ld_en),
    .buf_ld_data (buf_ld_data),
    .buf_row     (buf_row),
    .wb_en       (xb_wb_en),
    .wb_buf      (xb_wb_buf),
    .bank_wb_en  (bank_wb_en),
    .bank_wb_data(bank_wb_data)
  );

  // ------------------------------------------------------------ row buffers
  logic [BW-1:0] buf_rd_data [NBUFS];

  for (genvar k = 0; k < NBUFS; k++) begin : g_buf
    logic sel;
    assign sel = (cmd_buf == BF_W'(k));
    row_buffer #(.COLS(COLS_P), .DQ(DQ_P), .BL(BL_P)) u_buf (
      .clk      (clk),
      .load_en  (buf_ld_en[k]),
      .load_data(buf_ld_data[k]),
      .wr_en    (sel && cmd.op == CMD_WRITE),
      .wr_col   (cmd.col[CA_W-1:0]),
      .wr_data  (wdata),
      .rd_en    (sel && cmd.op == CMD_READ),
      .rd_col   (cmd.col[CA_W-1:0]),
      .rd_data  (buf_rd_data[k]),
      .row_q    (buf_row[k])
    );
  end

  // ------------------------------------------------------------ column mux and CAS latency
  logic            rd_d1;
  logic [BF_W-1:0] rd_buf_d1;
  always_ff @(posedge clk) begin
    if (!rst_n) rd_d1 <= 1'b0;
    else        rd_d1 <= (cmd.op == CMD_READ);
    rd_buf_d1 <= cmd_buf;
  end

  localparam int unsigned NPIPE = (CL_P > 1) ? CL_P - 1 : 1;
  logic          pipe_v [NPIPE];
  logic [BW-1:0] pipe_d [NPIPE];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NPIPE; i++) pipe_v[i] <= 1'b0;
    end else begin
      pipe_v[0] <= rd_d1;
      for (int i = 1; i < NPIPE; i++) pipe_v[i] <= pipe_v[i-1];
    end
    pipe_d[0] <= buf_rd_data[rd_buf_d1];
    for (int i = 1; i < NPIPE; i++) pipe_d[i] <= pipe_d[i-1];
  end

  assign rdata_valid = pipe_v[NPIPE-1];
  assign rdata       = pipe_d[NPIPE-1];

  // ------------------------------------------------------------ command rules
  // Column commands and write-backs need an open buffer.
  a_open_buffer: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd.op inside {CMD_READ, CMD_WRITE, CMD_PRE}) |-> buf_open[cmd_buf])
    else $error("rbs_sdram: command to a buffer holding no row");

  initial begin
    assert (CL_P >= 2) else $error("rbs_sdram: CL_P must be at least 2");
    assert (NBANKS <= 4 && NBUFS <= 4) else $error("rbs_sdram: command fields hold 4 banks/buffers");
  end

endmodule
