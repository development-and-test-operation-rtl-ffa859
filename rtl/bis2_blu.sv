// bis2_blu: BIS Logic Unit, the interlock logic of one DI Station.
//
// A DI Station reads up to N_DI alert inputs from the equipment (192 in the
// source design). For every input the unit applies two settings loaded by the
// supervisory processor: a mask, which makes the input ignored (for instance
// in an operation mode where that equipment is not in the beam path), and a
// holding time, which keeps the resulting request asserted for a programmed
// number of ticks after the alert has gone away, so that short alerts are not
// lost downstream. Each input also belongs to one of N_REQ zones; a zone is
// the part of the beam line behind one beam stopper (Faraday cup). The zone
// requests leave the station as hard-wired DO lines to the chopper unit, where
// they ask for the beam chopper to be excited, and they are also the
// insertion commands for the zone's beam stopper.
//
// Masks and holding times follow the source design; the zone grouping, the
// polarity (1 = alert), the tick unit and the register map are this design's
// choices.
//
// Timing: an alert on di_raw reaches req_out three clocks later (two
// synchronizer stages plus the output register). With a holding time of
// H > 0 ticks the request stays up for more than H and at most H+1 ticks
// after the synchronized alert clears; with H = 0 it follows the alert.
//
// Registers (station word address):
//   0x0000+i  channel i settings, read/write: [0] mask (1 = ignored),
//             [11:8] zone, [31:16] holding time in ticks
//   0x1000+w  synchronized input bits 32w..32w+31 (read only)
//   0x2000+w  per-channel request bits (after mask and hold, read only)
//   0x3000    zone request lines, req_out (read only)
// Reset leaves every input unmasked, in zone 0, with no holding time, so an
// unconfigured station stops the beam on any alert.
module bis2_blu
  import bis2_pkg::*;
#(
  parameter int unsigned N_DI     = 192,
  parameter int unsigned N_REQ    = 8,
  parameter int unsigned HOLD_W   = 16,
  parameter int unsigned TICK_DIV = 40000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_DI-1:0]   di_raw,     // alert inputs from the equipment, 1 = alert
  input  cfg_req_t          cfg,        // register bus from the supervisory side
  output logic [CFG_DW-1:0] cfg_rdata,  // read data, one clock after cfg.addr
  output logic [N_REQ-1:0]  req_out     // zone requests (hard wires / stopper commands)
);
  localparam int unsigned ZW  = (N_REQ > 1) ? $clog2(N_REQ) : 1;
  localparam int unsigned NW  = words32(N_DI);
  localparam int unsigned IW  = (N_DI > 1) ? $clog2(N_DI) : 1;

  initial begin
    assert (N_REQ <= 16) else $error("bis2_blu: zone field holds at most 16 zones");
    assert (HOLD_W <= 16) else $error("bis2_blu: holding-time field is 16 bits");
  end

  // ---------------------------------------------------------------- settings
  logic [N_DI-1:0]   mask;
  logic [ZW-1:0]     zone [N_DI];
  logic [HOLD_W-1:0] hold [N_DI];

  logic [IW-1:0] ci;  // channel index taken from the address
  assign ci = cfg.addr[IW-1:0];

  wire cfg_chan_wr = cfg.wr && (cfg.addr[15:12] == PAGE_CHAN_CFG) &&
                     (int'(cfg.addr[11:0]) < N_DI);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask <= '0;
      for (int i = 0; i < N_DI; i++) begin
        zone[i] <= '0;
        hold[i] <= '0;
      end
    end else if (cfg_chan_wr) begin
      mask[ci] <= cfg.wdata[0];
      zone[ci] <= cfg.wdata[8 +: ZW];
      hold[ci] <= cfg.wdata[16 +: HOLD_W];
    end
  end

  // ------------------------------------------------------------ input stage
  logic [N_DI-1:0] di_s;
  bis2_sync #(.W(N_DI)) u_sync (.clk, .rst_n, .d(di_raw), .q(di_s));

  logic tick;
  bis2_tick #(.DIV(TICK_DIV)) u_tick (.clk, .rst_n, .tick);

  // ------------------------------------------------- mask and holding time
  logic [N_DI-1:0]   active;
  logic [N_DI-1:0]   chan_req;
  logic [HOLD_W:0]   hcnt [N_DI];   // one bit wider: a hold of H loads H+1

  assign active = di_s & ~mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_DI; i++) hcnt[i] <= '0;
    end else begin
      for (int i = 0; i < N_DI; i++) begin
        if (active[i])
          hcnt[i] <= (hold[i] == '0) ? '0 : {1'b0, hold[i]} + 1'b1;
        else if (tick && hcnt[i] != '0) hcnt[i] <= hcnt[i] - 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N_DI; i++) chan_req[i] = active[i] || (hcnt[i] != '0);
  end

  // ------------------------------------------------------ zone reduction
  logic [N_REQ-1:0] req_next;
  always_comb begin
    req_next = '0;
    for (int i = 0; i < N_DI; i++) begin
      if (chan_req[i] && int'(zone[i]) < N_REQ) req_next[zone[i]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req_out <= '0;
    else        req_out <= req_next;
  end

  // A zone line rises only if some input request was active.
  a_req_has_cause: assert property (@(posedge clk) disable iff (!rst_n)
    (|req_out) |-> $past(|chan_req))
    else $error("bis2_blu: zone request without an active input");

  // ------------------------------------------------------------ read back
  logic [NW*32-1:0] di_pad, rq_pad;
  logic [CFG_DW-1:0] rd_next;
  logic [11:0]       idx;

  assign idx = cfg.addr[11:0];

  always_comb begin
    di_pad = '0;
    rq_pad = '0;
    di_pad[N_DI-1:0] = di_s;
    rq_pad[N_DI-1:0] = chan_req;
    rd_next = '0;
    unique case (cfg.addr[15:12])
      PAGE_CHAN_CFG: if (int'(idx) < N_DI) begin
        rd_next[0]           = mask[ci];
        rd_next[8 +: ZW]     = zone[ci];
        rd_next[16 +: HOLD_W] = hold[ci];
      end
      PAGE_CHAN_AUX: if (int'(idx) < NW) rd_next = di_pad[idx*32 +: 32];
      PAGE_STAT_A:   if (int'(idx) < NW) rd_next = rq_pad[idx*32 +: 32];
      PAGE_STAT_B:   rd_next[N_REQ-1:0] = req_out;
      default:       rd_next = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_rdata <= '0;
    else        cfg_rdata <= rd_next;
  end

endmodule
