// moment_engine: real-time image moment M_pq = sum x^p y^q f(x,y) of 8-bit
// grayscale frames, p, q = 0..7 (up to the 14th order), for 1024x1024 images
// by default.
//
// A control unit takes the camera's raster stream N_CELLS pixels per cycle
// and hands each pixel, with its coordinates and the moment order, to one
// cell of a ring of N_CELLS moment processor elements (the systolic array).
// The partial moments circulate in the ring, collecting one term per cell per
// pass; after a frame's last pixel the ring is emptied into the final
// accumulator, whose value is the moment. All arithmetic is in the unsigned
// 18-bit floating-point format of moment_pkg.
// Interface: in_valid/in_ready/in_pix carry beats of N_CELLS pixels (pixel j
// is column N_CELLS*g + j + 1 of the current column group g); p_cfg and q_cfg
// are sampled with the first beat of each frame. m_valid pulses for one cycle
// when m_value holds the moment of the frame just finished; m_value then
// stays until the next frame's drain begins. draining is high while the ring
// is being emptied.
// Timing: one beat per cycle; m_valid is high in the cycle that comes
// N_CELLS*MPE_LAT + 2 cycles after the cycle in which the frame's last beat
// is accepted (22 with four cells). Frames may follow
// back to back; the last beat of a frame waits if the previous frame's
// drain is still running, which only happens for frames under
// N_CELLS*MPE_LAT beats.
module moment_engine
  import moment_pkg::*;
#(
  parameter int unsigned IMG_ROWS = 1024,
  parameter int unsigned IMG_COLS = 1024,
  parameter int unsigned N_CELLS  = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [N_CELLS-1:0][PIX_W-1:0] in_pix,
  input  logic [POW_W-1:0]              p_cfg,
  input  logic [POW_W-1:0]              q_cfg,
  output logic                          m_valid,
  output fp_t                           m_value,
  output logic                          draining
);
  cell_in_t cells [N_CELLS];
  logic     fb_en, acc_en, acc_first, frame_done;
  fp_t      chain_out;

  control_unit #(.IMG_ROWS(IMG_ROWS), .IMG_COLS(IMG_COLS), .N_CELLS(N_CELLS)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_pix(in_pix),
    .p_cfg(p_cfg), .q_cfg(q_cfg), .cells(cells), .fb_en(fb_en), .acc_en(acc_en),
    .acc_first(acc_first), .frame_done(frame_done));

  systolic_array #(.N_CELLS(N_CELLS)) u_array (
    .clk(clk), .rst_n(rst_n), .cin(cells), .fb_en(fb_en), .chain_out(chain_out));

  moment_accumulator u_acc (
    .clk(clk), .rst_n(rst_n), .en(acc_en), .first(acc_first), .din(chain_out), .acc(m_value));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) m_valid <= 1'b0;
    else        m_valid <= frame_done;
  end

  assign draining = acc_en;
endmodule
