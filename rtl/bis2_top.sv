// bis2_top: the complete interlock, DI Stations, AI Stations and the chopper
// station wired together.
//
// N_DI_ST DI Stations (nine in the planned full system) each run a BIS Logic
// Unit on their alert inputs and send N_REQ zone request lines over hard
// wires to the chopper station. N_AI_ST AI Stations (seven planned) check
// their sampled analog channels against four limits; the beam-stop DO lines
// of AI Station a are wired into the last N_AI_DO alert inputs of DI Station
// a, so an analog anomaly stops the beam through the same fast digital path.
// The chopper station runs the BIS Chopper Unit, which weighs the requests
// against the beam-stopper insertion status and drives the beam choppers.
// The zone request lines are also brought out: they are the insertion
// commands for the beam stoppers.
//
// The station counts and per-station input counts follow the source design;
// the number of zones per DI Station, stoppers, choppers and AI output lines
// are this design's choices. All stations share one clock here; every
// station-to-station wire is resynchronized at its receiver, so the stations
// may equally run on separate clocks.
//
// Supervisory access: one register bus whose address bits [23:16] pick the
// station (0 = chopper unit, 1..N_DI_ST = DI Stations, N_DI_ST+1.. = AI
// Stations) and bits [15:0] the register inside it, as documented in each
// station. cfg_rdata follows cfg_addr by one clock.
//
// Latency: DI input to chop_out is 6 clocks (3 in the DI Station, 3 in the
// chopper unit); an analog sample past a beam-stop limit reaches chop_out in
// 9 clocks.
module bis2_top
  import bis2_pkg::*;
#(
  parameter int unsigned N_DI_ST  = 9,
  parameter int unsigned N_AI_ST  = 7,
  parameter int unsigned N_DI     = 192,
  parameter int unsigned N_REQ    = 8,
  parameter int unsigned N_FC     = 16,
  parameter int unsigned N_CHOP   = 8,
  parameter int unsigned N_AI     = 64,
  parameter int unsigned N_AI_DO  = 4,
  parameter int unsigned TICK_DIV = 40000
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // field inputs
  input  logic [N_DI_ST-1:0][N_DI-1:0]          di_in,      // alert inputs per DI Station
  input  logic [N_FC-1:0]                       fc_in,      // beam stopper inserted
  input  logic [N_AI_ST-1:0]                    ai_valid,   // converter sample strobe per AI Station
  input  logic [N_AI_ST-1:0][$clog2(N_AI)-1:0]  ai_ch,
  input  logic [N_AI_ST-1:0][15:0]              ai_data,    // signed sample value
  // supervisory register bus
  input  logic                                  cfg_wr,
  input  logic [23:0]                           cfg_addr,
  input  logic [CFG_DW-1:0]                     cfg_wdata,
  output logic [CFG_DW-1:0]                     cfg_rdata,
  // field outputs
  output logic [N_CHOP-1:0]                     chop_out,   // beam chopper excitation
  output logic [N_DI_ST-1:0][N_REQ-1:0]         zone_req,   // hard wires / stopper insertion
  output logic [N_AI_ST-1:0][N_AI_DO-1:0]       ai_do,      // AI Station beam-stop lines
  output logic [N_AI_ST-1:0]                    ai_warn     // AI Station warnings
);
  localparam int unsigned N_ST = 1 + N_DI_ST + N_AI_ST;

  initial begin
    assert (N_AI_ST <= N_DI_ST) else $error("bis2_top: each AI Station needs a DI Station");
    assert (N_AI_DO <= N_DI) else $error("bis2_top: AI lines exceed DI inputs");
    assert (N_ST <= 256) else $error("bis2_top: station field is 8 bits");
  end

  // ------------------------------------------------------ register bus fan-out
  cfg_req_t          st_cfg   [N_ST];
  logic [CFG_DW-1:0] st_rdata [N_ST];
  logic [7:0]        rd_sel;

  always_comb begin
    for (int s = 0; s < N_ST; s++) begin
      st_cfg[s].wr    = cfg_wr && (int'(cfg_addr[23:16]) == s);
      st_cfg[s].addr  = cfg_addr[15:0];
      st_cfg[s].wdata = cfg_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_sel <= '0;
    else        rd_sel <= cfg_addr[23:16];
  end

  always_comb begin
    cfg_rdata = '0;
    for (int s = 0; s < N_ST; s++) begin
      if (int'(rd_sel) == s) cfg_rdata = st_rdata[s];
    end
  end

  // -------------------------------------------------------------- AI Stations
  for (genvar a = 0; a < N_AI_ST; a++) begin : g_ai
    bis2_ai_station #(.N_AI(N_AI), .N_DO(N_AI_DO)) u_ai (
      .clk, .rst_n,
      .smp_valid (ai_valid[a]),
      .smp_ch    (ai_ch[a]),
      .smp_data  (ai_data[a]),
      .cfg       (st_cfg[1 + N_DI_ST + a]),
      .cfg_rdata (st_rdata[1 + N_DI_ST + a]),
      .do_out    (ai_do[a]),
      .warn_out  (ai_warn[a])
    );
  end

  // -------------------------------------------------------------- DI Stations
  for (genvar d = 0; d < N_DI_ST; d++) begin : g_di
    logic [N_DI-1:0] di_wired;
    if (d < N_AI_ST) begin : g_with_ai
      if (N_DI > N_AI_DO) begin : g_keep
        assign di_wired[N_DI-N_AI_DO-1:0] = di_in[d][N_DI-N_AI_DO-1:0];
      end
      assign di_wired[N_DI-1 -: N_AI_DO] = ai_do[d];
    end else begin : g_plain
      assign di_wired = di_in[d];
    end

    bis2_blu #(.N_DI(N_DI), .N_REQ(N_REQ), .TICK_DIV(TICK_DIV)) u_blu (
      .clk, .rst_n,
      .di_raw    (di_wired),
      .cfg       (st_cfg[1 + d]),
      .cfg_rdata (st_rdata[1 + d]),
      .req_out   (zone_req[d])
    );
  end

  // ----------------------------------------------------------- chopper station
  bis2_bcu #(.N_LINE(N_DI_ST * N_REQ), .N_FC(N_FC), .N_CHOP(N_CHOP)) u_bcu (
    .clk, .rst_n,
    .req_in    (zone_req),
    .fc_in     (fc_in),
    .cfg       (st_cfg[0]),
    .cfg_rdata (st_rdata[0]),
    .chop_out  (chop_out)
  );

endmodule
