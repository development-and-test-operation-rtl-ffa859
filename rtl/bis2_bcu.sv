// bis2_bcu: BIS Chopper Unit, the interlock logic of the chopper station.
//
// The chopper station receives the zone request lines of every DI Station
// over dedicated hard wires (N_LINE lines in all) and the insertion status of
// the beam stoppers (Faraday cups). For every request line the supervisory
// processor sets which stoppers lie upstream of that zone and which beam
// chopper serves it. A request excites its chopper only while none of its
// upstream stoppers is inserted: once the stopper in front of the faulty
// part is in, the chopper is released and beam can again be delivered up to
// that stopper, while the fault behind it is ignored. Choosing stopper sets
// and choppers per line lets the same hardware follow operation modes in
// which the beam travels a line in either direction.
//
// The comparison of BLU requests with stopper status follows the source
// design; the per-line stopper set, chopper select, line enable and register
// map are this design's choices.
//
// Timing: a request or stopper change reaches chop_out three clocks later
// (two synchronizer stages plus the output register).
//
// Registers (station word address):
//   0x0000+j  line j settings, read/write: [N_FC-1:0] upstream stopper set,
//             [18:16] chopper index, [31] line enabled
//   0x1000+w  synchronized request lines 32w..32w+31 (read only)
//   0x2000+w  synchronized stopper status (read only)
//   0x3000    chopper outputs (read only)
// Reset enables every line for chopper 0 with an empty stopper set, so an
// unconfigured station keeps the chopper on for any request.
module bis2_bcu
  import bis2_pkg::*;
#(
  parameter int unsigned N_LINE = 72,
  parameter int unsigned N_FC   = 16,
  parameter int unsigned N_CHOP = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_LINE-1:0] req_in,     // hard-wired zone requests from the DI Stations
  input  logic [N_FC-1:0]   fc_in,      // 1 = beam stopper inserted
  input  cfg_req_t          cfg,
  output logic [CFG_DW-1:0] cfg_rdata,
  output logic [N_CHOP-1:0] chop_out    // 1 = excite this beam chopper (beam off)
);
  localparam int unsigned CW = (N_CHOP > 1) ? $clog2(N_CHOP) : 1;
  localparam int unsigned LW = (N_LINE > 1) ? $clog2(N_LINE) : 1;
  localparam int unsigned NW = words32(N_LINE);
  localparam int unsigned FW = words32(N_FC);

  initial begin
    assert (N_FC <= 16) else $error("bis2_bcu: stopper set field holds 16 stoppers");
    assert (N_CHOP <= 8) else $error("bis2_bcu: chopper field holds 8 choppers");
  end

  // ---------------------------------------------------------------- settings
  logic [N_LINE-1:0] line_en;
  logic [N_FC-1:0]   fc_set [N_LINE];
  logic [CW-1:0]     chop_sel [N_LINE];

  logic [LW-1:0] li;
  assign li = cfg.addr[LW-1:0];
  wire cfg_line_wr = cfg.wr && (cfg.addr[15:12] == PAGE_CHAN_CFG) &&
                     (int'(cfg.addr[11:0]) < N_LINE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_en <= '1;
      for (int j = 0; j < N_LINE; j++) begin
        fc_set[j]   <= '0;
        chop_sel[j] <= '0;
      end
    end else if (cfg_line_wr) begin
      fc_set[li]   <= cfg.wdata[N_FC-1:0];
      chop_sel[li] <= cfg.wdata[16 +: CW];
      line_en[li]  <= cfg.wdata[31];
    end
  end

  // ------------------------------------------------------------ input stage
  logic [N_LINE-1:0] req_s;
  logic [N_FC-1:0]   fc_s;
  bis2_sync #(.W(N_LINE)) u_sync_req (.clk, .rst_n, .d(req_in), .q(req_s));
  bis2_sync #(.W(N_FC))   u_sync_fc  (.clk, .rst_n, .d(fc_in),  .q(fc_s));

  // ------------------------------------------------ request vs stopper check
  logic [N_CHOP-1:0] chop_next;
  always_comb begin
    chop_next = '0;
    for (int j = 0; j < N_LINE; j++) begin
      if (line_en[j] && req_s[j] && ((fc_set[j] & fc_s) == '0) &&
          int'(chop_sel[j]) < N_CHOP)
        chop_next[chop_sel[j]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chop_out <= '0;
    else        chop_out <= chop_next;
  end

  // A chopper is excited only if an enabled request line was active.
  a_chop_has_cause: assert property (@(posedge clk) disable iff (!rst_n)
    (|chop_out) |-> $past(|(req_s & line_en)))
    else $error("bis2_bcu: chopper excited without an active request line");

  // ------------------------------------------------------------ read back
  logic [NW*32-1:0]  rq_pad;
  logic [FW*32-1:0]  fc_pad;
  logic [CFG_DW-1:0] rd_next;
  logic [11:0]       idx;
  assign idx = cfg.addr[11:0];

  always_comb begin
    rq_pad = '0;
    fc_pad = '0;
    rq_pad[N_LINE-1:0] = req_s;
    fc_pad[N_FC-1:0]   = fc_s;
    rd_next = '0;
    unique case (cfg.addr[15:12])
      PAGE_CHAN_CFG: if (int'(idx) < N_LINE) begin
        rd_next[N_FC-1:0] = fc_set[li];
        rd_next[16 +: CW] = chop_sel[li];
        rd_next[31]       = line_en[li];
      end
      PAGE_CHAN_AUX: if (int'(idx) < NW) rd_next = rq_pad[idx*32 +: 32];
      PAGE_STAT_A:   if (int'(idx) < FW) rd_next = fc_pad[idx*32 +: 32];
      PAGE_STAT_B:   rd_next[N_CHOP-1:0] = chop_out;
      default:       rd_next = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_rdata <= '0;
    else        cfg_rdata <= rd_next;
  end

endmodule
