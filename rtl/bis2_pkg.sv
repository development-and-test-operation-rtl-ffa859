// bis2_pkg: types and constants shared by the interlock stations.
//
// Every station (DI Station logic unit, chopper unit, AI Station) is set up
// and monitored by its supervisory processor through the same small register
// bus: a write strobe, a 16-bit word address and 32-bit data. Read data comes
// back registered, one clock after the address is presented. The register
// map offsets below are this design's own choice; the source system only says
// that settings and monitoring live on the slow supervisory side and the
// interlock decisions on the FPGA.
package bis2_pkg;

  localparam int unsigned CFG_AW = 16;
  localparam int unsigned CFG_DW = 32;

  // One register-bus request, driven by the supervisory processor.
  typedef struct packed {
    logic              wr;     // write strobe, one clock per write
    logic [CFG_AW-1:0] addr;   // word address inside the station
    logic [CFG_DW-1:0] wdata;  // write data
  } cfg_req_t;

  // Register map pages (upper nibble of the station address).
  localparam logic [3:0] PAGE_CHAN_CFG = 4'h0;  // per-channel settings
  localparam logic [3:0] PAGE_CHAN_AUX = 4'h1;  // second per-channel page / raw status
  localparam logic [3:0] PAGE_STAT_A   = 4'h2;
  localparam logic [3:0] PAGE_STAT_B   = 4'h3;

  // AI Station limit slots inside a channel's four-word threshold group.
  typedef enum logic [1:0] {
    LIM_HH = 2'd0,  // upper-upper: beam stop
    LIM_H  = 2'd1,  // upper: warning
    LIM_L  = 2'd2,  // lower: warning
    LIM_LL = 2'd3   // lower-lower: beam stop
  } lim_slot_e;

  // Number of 32-bit status words needed to show n bits.
  function automatic int unsigned words32(int unsigned n);
    return (n + 31) / 32;
  endfunction

endpackage
