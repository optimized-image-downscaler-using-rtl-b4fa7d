// downscaler_top: image downscaler built from two polyphase filters whose
// phase (group delay) follows the position of each output pixel.
//
// Rather than dropping input pixels or oversampling, the scaler produces each
// output pixel between two input pixels by picking, per output pixel, one of a
// set of interpolation filters whose group delay matches the output position:
// 16 phases (1/16 line) vertically, 32 phases (1/32 pixel) horizontally. The
// blocks follow the published block diagram:
//
//   pix_in -> time_alignment -> line_memory (SRAM1, SRAM2, 1H/2H delays)
//          -> vertical_scaler:   vertical_filter (3 taps, 16 phases),
//                                vertical_dto (sel_v), sram_control, delay
//          -> horizontal_scaler: horizontal_filter (5 taps, 32 phases),
//                                horizontal_dto (sel_h), fifo_control
//          -> sync_fifo (256 x 16)
//
// sram_control addresses the line memories and sync_delay (the "delay" block
// of the vertical scaler) carries the active and framing signals past the
// three-cycle latency of the line memory and vertical filter. The grouping
// into a vertical and a horizontal scaler, with the memories outside, follows
// the published block diagram and module list.
//
// Interface: one 8-bit pixel per clock with horizontal (hin) and vertical
// (vin) active signals. scale_h / scale_v are the ratios in 1.16 fixed point
// (65536 = 1, 26887 = 1/2.4375; only ratios <= 1 are meaningful). The reader
// pops 16-bit words with rd_en: bits 7:0 are the pixel, bit 8 marks the first
// pixel of an output line, bit 9 the first of an output field, bits 15:10 are
// zero. overflow is a sticky flag for pixels lost to a full FIFO.
//
// Timing: the horizontal blanking between lines must be at least 4 clocks, and
// at most DEPTH pixels per line are stored (longer lines are vertically
// filtered with stale data beyond DEPTH). An output pixel whose horizontal
// carry falls on input pixel i is written into the FIFO on the sixth rising
// edge after the edge that samples pixel i on pix_in; its newest tap is pixel
// i+1. The scale inputs should only change while vin is low.
module downscaler_top
  import ds_pkg::*;
#(
  parameter int unsigned LINE_DEPTH = 768,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned FIFO_W     = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [PIX_W-1:0]             pix_in,
  input  logic                         hin,
  input  logic                         vin,
  input  logic [SCALE_W-1:0]           scale_h,
  input  logic [SCALE_W-1:0]           scale_v,
  input  logic                         rd_en,
  output logic [FIFO_W-1:0]            rd_data,
  output logic                         rd_valid,
  output logic                         empty,
  output logic                         full,
  output logic [$clog2(FIFO_DEPTH):0]  fifo_count,
  output logic                         overflow,
  output logic                         h_clipped
);

  localparam int unsigned LAW = $clog2(LINE_DEPTH);

  // Input stage
  logic [PIX_W-1:0] pix_a;
  logic             hin_a, vin_a, sol_a, sof_a;

  time_alignment u_align (
    .clk, .rst_n, .pix_in, .hin_in(hin), .vin_in(vin),
    .pix(pix_a), .hin(hin_a), .vin(vin_a), .sol(sol_a), .sof(sof_a)
  );

  // Line memory (SRAM1, SRAM2)
  logic             mem_en;
  logic [LAW-1:0]   mem_addr;
  logic [PIX_W-1:0] x0, x1, x2;

  line_memory #(.DEPTH(LINE_DEPTH), .DW(PIX_W)) u_linemem (
    .clk, .rst_n, .mem_en, .addr(mem_addr), .din(pix_a), .x0, .x1, .x2
  );

  // Vertical scaler: SRAM control, vertical DTO, vertical filter, delay
  logic [PIX_W-1:0] data_outv;
  logic             hin_b, sol_b, sof_b, en_v_b;

  vertical_scaler #(.LINE_DEPTH(LINE_DEPTH)) u_vscaler (
    .clk, .rst_n, .scale_v, .hin(hin_a), .vin(vin_a), .sol(sol_a), .sof(sof_a),
    .mem_en, .mem_addr, .x0, .x1, .x2,
    .data_outv, .hin_out(hin_b), .sol_out(sol_b), .sof_out(sof_b), .en_v_out(en_v_b)
  );

  // Horizontal scaler: horizontal DTO, horizontal filter, FIFO control
  logic              wr_en;
  logic [FIFO_W-1:0] wr_data;

  horizontal_scaler #(.FIFO_DEPTH(FIFO_DEPTH), .FIFO_W(FIFO_W)) u_hscaler (
    .clk, .rst_n, .scale_h, .data_outv, .hin(hin_b), .sol(sol_b), .sof(sof_b),
    .en_v(en_v_b), .fifo_count, .wr_en, .wr_data, .overflow, .h_clipped
  );

  // Output FIFO
  sync_fifo #(.DEPTH(FIFO_DEPTH), .DW(FIFO_W)) u_fifo (
    .clk, .rst_n, .wr_en, .wr_data,
    .rd_en, .rd_data, .rd_valid, .full, .empty, .count(fifo_count)
  );

endmodule
