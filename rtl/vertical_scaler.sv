// vertical_scaler: the vertical half of the downscaler.
//
// It groups the blocks that the published design places in its vertical
// scaler: the SRAM control that addresses the line memories, the vertical DTO
// that picks one of 16 filter phases and marks output lines, the 3-tap
// vertical filter, and the delay that carries the control signals past the
// line memory and the filter. The line memories themselves (SRAM1, SRAM2)
// stay outside, as memory macros.
//
// Interface: hin/vin/sol/sof come from the input stage with the pixel that is
// sent to the line memory in the same cycle; mem_en/mem_addr drive the line
// memory and x0/x1/x2 are its three taps, two cycles later. data_outv is the
// filtered pixel, three cycles after the input stage; hin_out, sol_out,
// sof_out and en_v_out are aligned with it. en_v_out is high for the whole of
// every line that produces an output line.
module vertical_scaler
  import ds_pkg::*;
#(
  parameter int unsigned LINE_DEPTH = 768,
  parameter int unsigned LAW        = $clog2(LINE_DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SCALE_W-1:0]  scale_v,
  input  logic                hin,
  input  logic                vin,
  input  logic                sol,
  input  logic                sof,
  output logic                mem_en,
  output logic [LAW-1:0]      mem_addr,
  input  logic [PIX_W-1:0]    x0,
  input  logic [PIX_W-1:0]    x1,
  input  logic [PIX_W-1:0]    x2,
  output logic [PIX_W-1:0]    data_outv,
  output logic                hin_out,
  output logic                sol_out,
  output logic                sof_out,
  output logic                en_v_out
);

  logic               en_v;
  logic [V_SEL_W-1:0] sel_v;

  sram_control #(.DEPTH(LINE_DEPTH), .AW(LAW)) u_sram_ctl (
    .clk, .rst_n, .hin, .mem_en, .addr(mem_addr)
  );

  vertical_dto u_vdto (
    .clk, .rst_n, .scale_v, .en_vin(vin), .en_hin(hin), .en_v, .sel_v
  );

  vertical_filter u_vfilt (
    .clk, .rst_n, .x0, .x1, .x2, .sel(sel_v), .dout(data_outv)
  );

  // line memory (2) + filter (1) = 3 cycles; en_v already leaves the DTO one
  // cycle after the input stage, so it needs 2 more.
  sync_delay #(.W(3), .LAT(3)) u_delay (
    .clk, .rst_n, .din({hin, sol, sof}), .dout({hin_out, sol_out, sof_out})
  );

  sync_delay #(.W(1), .LAT(2)) u_delay_env (
    .clk, .rst_n, .din(en_v), .dout(en_v_out)
  );

endmodule
