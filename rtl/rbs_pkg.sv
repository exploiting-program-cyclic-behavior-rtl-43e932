// rbs_pkg: shared types and constants of the row-buffer-sharing (RBS) DDR2 memory system.
//
// The memory is a 4-bank DDR2 SDRAM whose row buffers are not tied to a bank: any of the
// NUM_BUFS buffers can hold an open row of any bank, reached through a crossbar. The
// controller names the buffer in every command, so the command word carries a buffer index
// next to the usual bank/row/column fields.
//
// Timing values are those of the MT47H128M4B6-5E part (tCK 5 ns, tRCD 15 ns, tCCD 10 ns,
// tWTR 10 ns, tRP 15 ns, tRAS 40 ns, refresh interval 70000 ns) converted to clock cycles by
// rounding up. The array geometry (16K rows, 2K columns of 4 bits), CAS latency 3, burst
// length 4 and refresh cycle time 105 ns come from that part's data sheet, not from the RBS
// scheme itself, and are parameters everywhere they are used.
package rbs_pkg;

  // ---------------------------------------------------------------- geometry defaults
  localparam int unsigned NUM_BANKS = 4;       // DDR2 banks
  localparam int unsigned NUM_BUFS  = 4;       // shared row buffers (one per bank in the base part)
  localparam int unsigned ROWS      = 16384;   // rows per bank
  localparam int unsigned COLS      = 2048;    // columns per row
  localparam int unsigned DQ        = 4;       // data pins = column width
  localparam int unsigned BL        = 4;       // burst length (columns per READ/WRITE)

  // ---------------------------------------------------------------- timing (ns)
  localparam int unsigned TCK_NS   = 5;
  localparam int unsigned TRCD_NS  = 15;
  localparam int unsigned TCCD_NS  = 10;
  localparam int unsigned TWTR_NS  = 10;
  localparam int unsigned TRP_NS   = 15;
  localparam int unsigned TRAS_NS  = 40;
  localparam int unsigned TREFI_NS = 70000;
  localparam int unsigned TRFC_NS  = 105;

  // Round a time in ns up to whole clock cycles.
  function automatic int unsigned ns2clk(input int unsigned ns);
    return (ns + TCK_NS - 1) / TCK_NS;
  endfunction

  localparam int unsigned T_RCD  = ns2clk(TRCD_NS);   // 3
  localparam int unsigned T_CCD  = ns2clk(TCCD_NS);   // 2
  localparam int unsigned T_WTR  = ns2clk(TWTR_NS);   // 2
  localparam int unsigned T_RP   = ns2clk(TRP_NS);    // 3
  localparam int unsigned T_RAS  = ns2clk(TRAS_NS);   // 8
  localparam int unsigned T_REFI = ns2clk(TREFI_NS);  // 14000
  localparam int unsigned T_RFC  = ns2clk(TRFC_NS);   // 21
  localparam int unsigned T_XBAR = 1;                 // crossbar delay, memory cycles
  localparam int unsigned CL     = 3;                 // READ to data, cycles

  // ---------------------------------------------------------------- scheduler
  localparam int unsigned QDEPTH     = 8;   // request queue entries
  localparam int unsigned MAX_BYPASS = 16;  // times the oldest request may be passed over
  localparam int unsigned TAG_W      = 4;   // request tag width

  // ---------------------------------------------------------------- command bus
  typedef enum logic [2:0] {
    CMD_NOP   = 3'd0,
    CMD_ACT   = 3'd1,   // copy row of bank into buffer
    CMD_READ  = 3'd2,   // burst read from buffer
    CMD_WRITE = 3'd3,   // burst write into buffer
    CMD_PRE   = 3'd4,   // write a (dirty) buffer back to the bank it came from
    CMD_REF   = 3'd5    // auto refresh of all bank arrays
  } cmd_op_e;

  // Field widths are sized for the largest geometry used; modules use the low bits.
  typedef struct packed {
    cmd_op_e     op;
    logic [1:0]  bank;   // ACT: bank to open
    logic [15:0] row;    // ACT: row to open
    logic [10:0] col;    // READ/WRITE: first column of the burst
    logic [1:0]  buf_id; // ACT/READ/WRITE/PRE: row buffer addressed
  } ddr_cmd_t;

  // Event counters exported by the controller.
  typedef struct packed {
    logic [31:0] hits;        // request found its row in a buffer
    logic [31:0] misses;      // request needed an ACT
    logic [31:0] writebacks;  // dirty victim written back (PRE)
    logic [31:0] refreshes;   // REF commands
    logic [31:0] bypasses;    // requests served ahead of an older one
    logic [31:0] overlapped;  // hits issued while the engine was serving a miss
  } rbs_stats_t;

endpackage
