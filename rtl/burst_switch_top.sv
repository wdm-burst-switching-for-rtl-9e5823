// burst_switch_top: electronic control of a three-stage WDM burst switch.
//
// D*D external links, each with its own input/output module (iom_ctrl),
// are joined by a three-stage Benes network of D-port burst switch elements
// (bse_ctrl), D elements per stage. Output j of first-stage element i feeds
// input i of middle element j; output m of middle element j feeds input j of
// last-stage element m; output q of last-stage element m is external link
// m*D+q. The first stage spreads bursts over all middle elements; the middle
// stage routes on the high base-D digit of the output port, the last stage
// on the low digit. Header cells travel this network, and every element
// books the bursts on its output links ahead of time.
//
// The optical data path (crossbars, wavelength selectors and converters,
// couplers, storage units, delay lines) is not logic; the channel
// assignments that would set it are brought out on xbar_valid/xbar_cmd,
// indexed [stage][element][output].
//
// Time: 'now' counts slots and advances by one in each cycle with tick
// high. Slot length, widths, table size and window sizes are this design's
// choices; D = 8 and 512 channels per link are the document's example.
module burst_switch_top
  import burst_pkg::*;
#(
  parameter int unsigned D         = 8,
  parameter int unsigned CHANNELS  = 512,
  parameter int unsigned SLOTS     = 256,
  parameter int unsigned DELTA     = 2,
  parameter int unsigned RSQ_DEPTH = 16,
  parameter int unsigned BSU_LOCS  = 8,
  parameter int unsigned RT_AW     = 8,
  localparam int unsigned L        = D * D
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  output time_t             now,
  // routing table writes
  input  logic              rt_wr_en,
  input  logic [PORT_W-1:0] rt_wr_link,
  input  logic [RT_AW-1:0]  rt_wr_idx,
  input  logic [PORT_W-1:0] rt_wr_port,
  // external links
  input  logic              ext_in_valid  [L],
  input  bhc_t              ext_in_bhc    [L],
  output logic              ext_in_ready  [L],
  output logic              ext_out_valid [L],
  output bhc_t              ext_out_bhc   [L],
  input  logic              ext_out_ready [L],
  // optical data path settings and events
  output logic              xbar_valid [3][D][D],
  output xbar_cmd_t         xbar_cmd   [3][D][D],
  output logic              ev_direct  [3][D][D],
  output logic              ev_stored  [3][D][D],
  output logic              ev_drop    [3][D][D]
);

  // per stage, element and port
  logic s_in_valid  [3][D][D];
  bhc_t s_in_bhc    [3][D][D];
  logic s_in_ready  [3][D][D];
  logic s_out_valid [3][D][D];
  bhc_t s_out_bhc   [3][D][D];
  logic s_out_ready [3][D][D];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    now <= '0;
    else if (tick) now <= now + time_t'(1);
  end

  for (genvar l = 0; l < L; l++) begin : g_iom
    iom_ctrl #(.RT_AW(RT_AW)) u_iom (
      .clk, .rst_n, .now,
      .rt_wr_en(rt_wr_en && rt_wr_link == PORT_W'(l)), .rt_wr_idx, .rt_wr_port,
      .link_in_valid(ext_in_valid[l]), .link_in_bhc(ext_in_bhc[l]), .link_in_ready(ext_in_ready[l]),
      .to_bse_valid(s_in_valid[0][l/D][l%D]), .to_bse_bhc(s_in_bhc[0][l/D][l%D]),
      .to_bse_ready(s_in_ready[0][l/D][l%D]),
      .from_bse_valid(s_out_valid[2][l/D][l%D]), .from_bse_bhc(s_out_bhc[2][l/D][l%D]),
      .from_bse_ready(s_out_ready[2][l/D][l%D]),
      .link_out_valid(ext_out_valid[l]), .link_out_bhc(ext_out_bhc[l]), .link_out_ready(ext_out_ready[l])
    );
  end

  // Benes wiring: output j of element i in stage s -> input i of element j in stage s+1
  for (genvar s = 0; s < 2; s++) begin : g_link
    for (genvar i = 0; i < D; i++) begin : g_e
      for (genvar j = 0; j < D; j++) begin : g_p
        assign s_in_valid[s+1][j][i] = s_out_valid[s][i][j];
        assign s_in_bhc[s+1][j][i]   = s_out_bhc[s][i][j];
        assign s_out_ready[s][i][j]  = s_in_ready[s+1][j][i];
      end
    end
  end

  for (genvar s = 0; s < 3; s++) begin : g_stage
    for (genvar b = 0; b < D; b++) begin : g_bse
      bse_ctrl #(
        .D(D), .DIST(s == 0), .DIGIT(s == 1 ? 1 : 0),
        .CHANNELS(CHANNELS), .SLOTS(SLOTS), .DELTA(DELTA),
        .RSQ_DEPTH(RSQ_DEPTH), .BSU_LOCS(BSU_LOCS)
      ) u_bse (
        .clk, .rst_n, .now,
        .in_valid(s_in_valid[s][b]), .in_bhc(s_in_bhc[s][b]), .in_ready(s_in_ready[s][b]),
        .out_valid(s_out_valid[s][b]), .out_bhc(s_out_bhc[s][b]), .out_ready(s_out_ready[s][b]),
        .xbar_valid(xbar_valid[s][b]), .xbar_cmd(xbar_cmd[s][b]),
        .ev_direct(ev_direct[s][b]), .ev_stored(ev_stored[s][b]), .ev_drop(ev_drop[s][b])
      );
    end
  end

endmodule
