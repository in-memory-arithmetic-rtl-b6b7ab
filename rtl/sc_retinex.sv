// sc_retinex: Retinex image enhancement with stochastic in-memory division.
//
// Retinex treats an image as I = R * L, reflectance times illumination, and
// recovers R = I / L. The illumination L is estimated by a Gaussian low-pass
// of I computed in ordinary binary arithmetic (gauss3x3); the division is
// done by the stochastic LIM divider (sc_div_unit, N = 2^LOG_N = 256
// stream bits), one divider per colour channel.
//
// Structure: an input frame buffer (IMG_W x IMG_H words of CHANNELS x DATA_W
// bits, written through in_we/in_addr/in_pix), a controller, one gauss3x3
// and one sc_div_unit per channel, and an output frame buffer read through
// out_addr/out_pix (one-cycle read latency). Frame buffers, their ports,
// the image size (600 x 400) and the pixel order (raster) are this design's
// own choices.
//
// Per pixel, the controller reads the 3x3 neighbourhood from the input
// buffer (9 reads, edge pixels replicated at the borders), computes L for
// each channel, starts all dividers together with X = I (window centre) and
// Y = L, and on done writes R = min(M * 2^DATA_W / N, 2^DATA_W - 1) to the
// output buffer. Since I > L saturates the divider, R is 1.0 (255) there;
// L = 0 gives R = 0. A pixel takes 9 + 2 + (N + 2) cycles; done pulses once
// after the last pixel. The input buffer must not be written while busy.
module sc_retinex #(
  parameter int unsigned IMG_W    = 600,
  parameter int unsigned IMG_H    = 400,
  parameter int unsigned CHANNELS = 3,
  parameter int unsigned LOG_N    = 8,
  parameter int unsigned DATA_W   = 8,
  localparam int unsigned NPIX    = IMG_W * IMG_H,
  localparam int unsigned ADDR_W  = $clog2(NPIX)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_we,
  input  logic [ADDR_W-1:0]                 in_addr,
  input  logic [CHANNELS-1:0][DATA_W-1:0]   in_pix,
  input  logic                              start,
  output logic                              busy,
  output logic                              done,
  input  logic [ADDR_W-1:0]                 out_addr,
  output logic [CHANNELS-1:0][DATA_W-1:0]   out_pix
);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_LAST, S_DIV, S_WAIT} state_t;
  typedef logic [CHANNELS-1:0][DATA_W-1:0] pix_t;

  localparam int unsigned XW = $clog2(IMG_W + 1);
  localparam int unsigned YW = $clog2(IMG_H + 1);
  localparam logic [DATA_W-1:0] PIX_MAX = '1;

  pix_t in_mem  [NPIX];
  pix_t out_mem [NPIX];

  state_t            state;
  logic [XW-1:0]     px;
  logic [YW-1:0]     py;
  logic [3:0]        widx;       // window position being read, 0..8
  logic [XW-1:0]     nx;
  logic [YW-1:0]     ny;
  logic [ADDR_W-1:0] rd_addr;
  pix_t              rd_data;
  logic [3:0]        rd_idx;
  logic              rd_vld;
  pix_t              win [9];
  logic [ADDR_W-1:0] pix_addr;
  logic              last_pix;

  logic [CHANNELS-1:0]            div_busy, div_done;
  logic [CHANNELS-1:0][LOG_N:0]   div_q;
  pix_t                           l_val, r_val;

  // ---------------- frame buffers ----------------
  always_ff @(posedge clk) begin
    if (in_we) in_mem[in_addr] <= in_pix;
  end

  always_ff @(posedge clk) begin
    rd_data <= in_mem[rd_addr];
    out_pix <= out_mem[out_addr];
  end

  always_ff @(posedge clk) begin
    if (state == S_WAIT && div_done[0]) out_mem[pix_addr] <= r_val;
  end

  // ---------------- neighbour address (edge replicate) ----------------
  always_comb begin
    logic [1:0] dx, dy;
    dx = 2'(widx % 4'd3);
    dy = 2'(widx / 4'd3);
    nx = px;
    ny = py;
    if (dx == 2'd0 && px != '0)              nx = px - 1'b1;
    if (dx == 2'd2 && px != XW'(IMG_W - 1))  nx = px + 1'b1;
    if (dy == 2'd0 && py != '0)              ny = py - 1'b1;
    if (dy == 2'd2 && py != YW'(IMG_H - 1))  ny = py + 1'b1;
    rd_addr = ADDR_W'(ny) * ADDR_W'(IMG_W) + ADDR_W'(nx);
  end

  assign pix_addr = ADDR_W'(py) * ADDR_W'(IMG_W) + ADDR_W'(px);
  assign last_pix = (px == XW'(IMG_W - 1)) && (py == YW'(IMG_H - 1));
  assign busy     = (state != S_IDLE);

  // ---------------- controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      px     <= '0;
      py     <= '0;
      widx   <= '0;
      rd_vld <= 1'b0;
      rd_idx <= '0;
      done   <= 1'b0;
    end else begin
      done   <= 1'b0;
      rd_vld <= (state == S_FETCH);
      rd_idx <= widx;
      case (state)
        S_IDLE: if (start) begin
          px    <= '0;
          py    <= '0;
          widx  <= '0;
          state <= S_FETCH;
        end
        S_FETCH: begin
          widx <= widx + 1'b1;
          if (widx == 4'd8) state <= S_LAST;
        end
        S_LAST: state <= S_DIV;
        S_DIV:  state <= S_WAIT;
        S_WAIT: if (div_done[0]) begin
          widx <= '0;
          if (last_pix) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_FETCH;
            if (px == XW'(IMG_W - 1)) begin
              px <= '0;
              py <= py + 1'b1;
            end else begin
              px <= px + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Window registers, filled one read later than the address was issued.
  always_ff @(posedge clk) begin
    if (rd_vld) win[rd_idx] <= rd_data;
  end

  // ---------------- per-channel datapath ----------------
  for (genvar c = 0; c < CHANNELS; c++) begin : g_ch
    logic [8:0][DATA_W-1:0] cwin;
    logic [LOG_N+DATA_W:0]  scaled;

    for (genvar i = 0; i < 9; i++) begin : g_w
      assign cwin[i] = win[i][c];
    end

    gauss3x3 #(.DATA_W(DATA_W)) u_gauss (.win(cwin), .l_out(l_val[c]));

    sc_div_unit #(.LOG_N(LOG_N), .DATA_W(DATA_W)) u_div (
      .clk(clk), .rst_n(rst_n), .start(state == S_DIV),
      .x_val(win[4][c]), .y_val(l_val[c]),
      .busy(div_busy[c]), .done(div_done[c]), .q_count(div_q[c])
    );

    assign scaled   = (LOG_N + DATA_W + 1)'({div_q[c], {DATA_W{1'b0}}} >> LOG_N);
    assign r_val[c] = (scaled > (LOG_N + DATA_W + 1)'(PIX_MAX)) ? PIX_MAX : DATA_W'(scaled);
  end

  // All dividers start together and take the same number of cycles.
  assert property (@(posedge clk) disable iff (!rst_n) div_done[0] |-> &div_done);
  assert property (@(posedge clk) disable iff (!rst_n) (state == S_DIV) |-> !(|div_busy));

endmodule
