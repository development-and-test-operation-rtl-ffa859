// bis2_ai_station: limit checking logic of one AI Station.
//
// The analog inputs (beam-loss currents from log amplifiers and other
// readings, 64 per station in the source design) are sampled by a scanning
// converter that delivers one (channel, value) pair at a time. For every
// channel four limits are held in on-chip memory: upper-upper, upper, lower
// and lower-lower. A value above the upper limit or below the lower limit is
// a warning, which the supervisory side turns into an audible alarm. A value
// above the upper-upper limit or below the lower-lower limit is an anomaly:
// it raises the channel's beam-stop DO line, which is wired to an input of a
// DI Station, so the beam is stopped through the fast digital path. Upper
// and lower checks can be enabled separately, so pure beam-loss channels use
// only the upper pair as the predecessor system did.
//
// The four limits and the warning/stop split follow the source design. The
// signed 16-bit values, strict comparisons ("exceeds"), per-side enables,
// grouping of channels onto N_DO output lines and the register map are this
// design's choices. Flags reflect the latest sample of each channel; they are
// not latched.
//
// Timing: a sample accepted on smp_valid reaches do_out and warn_out three
// clocks later (threshold read, compare, output register). One sample can be
// accepted every clock.
//
// Registers (station word address):
//   0x0000 + 4*ch + k  limit k of channel ch (k: 0 HH, 1 H, 2 L, 3 LL),
//                      signed value in [15:0], read/write
//   0x1000 + ch        channel settings: [0] upper checks on, [1] lower
//                      checks on, [7:4] DO line, read/write
//   0x2000 + ch        latest value of channel ch (read only)
//   0x3000 + w         stop flags, 0x3080 + w warning flags (read only)
//   0x3100             do_out (read only)
// Reset turns every channel's checks off: limits must be loaded first.
module bis2_ai_station
  import bis2_pkg::*;
#(
  parameter int unsigned N_AI = 64,
  parameter int unsigned N_DO = 4,
  parameter int unsigned DW   = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     smp_valid,  // one converted sample
  input  logic [$clog2(N_AI)-1:0]  smp_ch,     // its channel
  input  logic signed [DW-1:0]     smp_data,   // its value
  input  cfg_req_t                 cfg,
  output logic [CFG_DW-1:0]        cfg_rdata,
  output logic [N_DO-1:0]          do_out,     // beam-stop lines to a DI Station
  output logic                     warn_out    // any channel past an upper/lower limit
);
  localparam int unsigned CHW = $clog2(N_AI);
  localparam int unsigned OW  = (N_DO > 1) ? $clog2(N_DO) : 1;
  localparam int unsigned NW  = words32(N_AI);

  initial begin
    assert (N_DO <= 16) else $error("bis2_ai_station: DO field holds 16 lines");
    assert (DW <= 16) else $error("bis2_ai_station: limits are 16-bit register fields");
    assert (N_AI >= 2 && N_AI <= 1024) else $error("bis2_ai_station: N_AI out of range");
  end

  // ------------------------------------------------------ limit memories
  logic signed [DW-1:0] lim_hh [N_AI];
  logic signed [DW-1:0] lim_h  [N_AI];
  logic signed [DW-1:0] lim_l  [N_AI];
  logic signed [DW-1:0] lim_ll [N_AI];
  logic signed [DW-1:0] last_v [N_AI];

  logic [CHW-1:0] lch;   // channel of a limit access
  logic [CHW-1:0] cch;   // channel of a settings/status access
  lim_slot_e      lslot;
  assign lch   = cfg.addr[2 +: CHW];
  assign cch   = cfg.addr[CHW-1:0];
  assign lslot = lim_slot_e'(cfg.addr[1:0]);

  wire lim_wr = cfg.wr && cfg.addr[15:12] == PAGE_CHAN_CFG &&
                int'(cfg.addr[11:2]) < N_AI;
  wire ctl_wr = cfg.wr && cfg.addr[15:12] == PAGE_CHAN_AUX &&
                int'(cfg.addr[11:0]) < N_AI;

  always_ff @(posedge clk) begin
    if (lim_wr) begin
      unique case (lslot)
        LIM_HH: lim_hh[lch] <= cfg.wdata[DW-1:0];
        LIM_H:  lim_h[lch]  <= cfg.wdata[DW-1:0];
        LIM_L:  lim_l[lch]  <= cfg.wdata[DW-1:0];
        LIM_LL: lim_ll[lch] <= cfg.wdata[DW-1:0];
      endcase
    end
  end

  // ------------------------------------------------------ channel settings
  logic [N_AI-1:0] en_hi, en_lo;
  logic [OW-1:0]   do_sel [N_AI];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_hi <= '0;
      en_lo <= '0;
      for (int c = 0; c < N_AI; c++) do_sel[c] <= '0;
    end else if (ctl_wr) begin
      en_hi[cch]  <= cfg.wdata[0];
      en_lo[cch]  <= cfg.wdata[1];
      do_sel[cch] <= cfg.wdata[4 +: OW];
    end
  end

  // ------------------------------------------- stage 1: read the limits
  logic                 s1_valid;
  logic [CHW-1:0]       s1_ch;
  logic signed [DW-1:0] s1_v, s1_hh, s1_h, s1_l, s1_ll;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= smp_valid;
  end

  always_ff @(posedge clk) begin
    if (smp_valid) begin
      s1_ch <= smp_ch;
      s1_v  <= smp_data;
      s1_hh <= lim_hh[smp_ch];
      s1_h  <= lim_h[smp_ch];
      s1_l  <= lim_l[smp_ch];
      s1_ll <= lim_ll[smp_ch];
    end
  end

  // ------------------------------------- stage 2: compare, update flags
  logic [N_AI-1:0] stop_f, warn_f;

  logic [N_AI-1:0] s1_sel;   // one-hot of the channel being updated
  logic            hit_stop, hit_warn;

  always_comb begin
    s1_sel   = s1_valid ? (N_AI'(1) << s1_ch) : '0;
    hit_stop = (en_hi[s1_ch] && s1_v > s1_hh) || (en_lo[s1_ch] && s1_v < s1_ll);
    hit_warn = (en_hi[s1_ch] && s1_v > s1_h)  || (en_lo[s1_ch] && s1_v < s1_l);
  end

  // The flags of the sampled channel are replaced by the new result; a
  // channel whose checks are switched off drops its flags at once.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stop_f <= '0;
      warn_f <= '0;
    end else begin
      stop_f <= ((stop_f & ~s1_sel) | (hit_stop ? s1_sel : '0)) & (en_hi | en_lo);
      warn_f <= ((warn_f & ~s1_sel) | (hit_warn ? s1_sel : '0)) & (en_hi | en_lo);
    end
  end

  always_ff @(posedge clk) begin
    if (s1_valid) last_v[s1_ch] <= s1_v;
  end

  // ---------------------------------------------- stage 3: output lines
  logic [N_DO-1:0] do_next;
  always_comb begin
    do_next = '0;
    for (int c = 0; c < N_AI; c++) begin
      if (stop_f[c] && int'(do_sel[c]) < N_DO) do_next[do_sel[c]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      do_out   <= '0;
      warn_out <= 1'b0;
    end else begin
      do_out   <= do_next;
      warn_out <= |warn_f;
    end
  end

  // A stop line is raised only if some channel was past a beam-stop limit.
  a_do_has_cause: assert property (@(posedge clk) disable iff (!rst_n)
    (|do_out) |-> $past(|stop_f))
    else $error("bis2_ai_station: stop line without a stop flag");

  // ------------------------------------------------------------ read back
  logic [NW*32-1:0]  st_pad, wn_pad;
  logic [CFG_DW-1:0] rd_next;
  logic [11:0]       idx;
  assign idx = cfg.addr[11:0];

  always_comb begin
    st_pad = '0;
    wn_pad = '0;
    st_pad[N_AI-1:0] = stop_f;
    wn_pad[N_AI-1:0] = warn_f;
    rd_next = '0;
    unique case (cfg.addr[15:12])
      PAGE_CHAN_CFG: if (int'(cfg.addr[11:2]) < N_AI) begin
        unique case (lslot)
          LIM_HH: rd_next = CFG_DW'(lim_hh[lch]);
          LIM_H:  rd_next = CFG_DW'(lim_h[lch]);
          LIM_L:  rd_next = CFG_DW'(lim_l[lch]);
          LIM_LL: rd_next = CFG_DW'(lim_ll[lch]);
        endcase
        rd_next[CFG_DW-1:DW] = '0;
      end
      PAGE_CHAN_AUX: if (int'(idx) < N_AI) begin
        rd_next[0]      = en_hi[cch];
        rd_next[1]      = en_lo[cch];
        rd_next[4 +: OW] = do_sel[cch];
      end
      PAGE_STAT_A: if (int'(idx) < N_AI) begin
        rd_next[DW-1:0] = last_v[cch];
      end
      PAGE_STAT_B: begin
        if (idx[11:7] == 5'd0 && int'(idx[6:0]) < NW)
          rd_next = st_pad[idx[6:0]*32 +: 32];
        else if (idx[11:7] == 5'd1 && int'(idx[6:0]) < NW)
          rd_next = wn_pad[idx[6:0]*32 +: 32];
        else if (idx == 12'h100)
          rd_next[N_DO-1:0] = do_out;
      end
      default: rd_next = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_rdata <= '0;
    else        cfg_rdata <= rd_next;
  end

endmodule
