// horizontal_scaler: the horizontal half of the downscaler.
//
// It groups the blocks that the published design places in its horizontal
// scaler: the horizontal DTO (phase and pixel enable), the 5-tap, 32-phase
// horizontal filter, and the FIFO control that writes only valid output
// pixels. The FIFO word is {zero padding, field-start tag, line-start tag,
// pixel}.
//
// Interface: data_outv with hin/sol/sof/en_v aligned to it (the vertical
// scaler's outputs); fifo_count is the output FIFO's fill level. wr_en and
// wr_data go to the FIFO. A pixel whose horizontal carry falls on the pixel
// presented at clock edge e is written at edge e + 2 (wr_en is high in the
// cycle before that edge). h_clipped reports the limiter on the filter output
// of the same cycle.
module horizontal_scaler
  import ds_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned FIFO_W     = 16,
  parameter int unsigned FAW        = $clog2(FIFO_DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SCALE_W-1:0]  scale_h,
  input  logic [PIX_W-1:0]    data_outv,
  input  logic                hin,
  input  logic                sol,
  input  logic                sof,
  input  logic                en_v,
  input  logic [FAW:0]        fifo_count,
  output logic                wr_en,
  output logic [FIFO_W-1:0]   wr_data,
  output logic                overflow,
  output logic                h_clipped
);

  logic               en_h;
  logic [H_SEL_W-1:0] sel_h;
  logic [PIX_W-1:0]   data_outh;
  logic               sol_tag, sof_tag;

  horizontal_dto u_hdto (
    .clk, .rst_n, .scale_h, .en_hin(hin), .en_h, .sel_h
  );

  horizontal_filter u_hfilt (
    .clk, .rst_n, .shift_en(hin), .din(data_outv), .sel(sel_h),
    .dout(data_outh), .clipped(h_clipped)
  );

  fifo_control #(.DEPTH(FIFO_DEPTH), .AW(FAW)) u_fifo_ctl (
    .clk, .rst_n, .en_h, .en_v, .sol, .sof,
    .count(fifo_count), .wr_en, .sol_tag, .sof_tag, .overflow
  );

  assign wr_data = FIFO_W'({sof_tag, sol_tag, data_outh});

endmodule
