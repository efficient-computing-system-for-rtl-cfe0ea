// Image sharpening engine built on the radix-8 approximate Booth multiplier.
//
// A greyscale image arrives as a raster stream, one 8-bit pixel per cycle
// in which pix_valid is high (gaps are allowed). For every pixel whose 5x5
// neighbourhood lies inside the image the engine emits
//
//   S(x,y) = clamp_0_255( 2*I(x,y) - (1/273) * sum G(i,j) * I(x+i,y+j) )
//
// with the 5x5 integer Gaussian G = [1 4 7 4 1; 4 16 26 16 4; 7 26 41 26 7;
// 4 16 26 16 4; 1 4 7 4 1] (sum 273). The 25 products G*I are formed by 25
// R8ANBM multipliers (the Gaussian weight is the multiplicand A, the pixel
// the Booth-encoded multiplier B), so the result carries the multiplier's
// approximation; the rest of the datapath is exact. Division by 273 is a
// multiplication by round(2^20/273) = 3841 and a right shift by 20.
//
// The multiplier and the 225 x 225 image size follow the published
// evaluation; the kernel, the operand roles, the border handling and the
// streaming pipeline are this design's choices.
//
// Structure: four line_buffer instances hold the previous four lines; a 5x5
// register window shifts one column per valid pixel.
// Pipeline (one register stage each): window -> 25 products -> result.
// The output for the window completed by the pixel accepted at clock edge k
// is registered at edge k+2 (out_valid high for that one cycle), centred on
// the pixel two lines above and two columns left of the accepted one.
// Outputs come in raster order, (IMG_W-4) per line, (IMG_H-4) lines.
// After IMG_W*IMG_H pixels the position counters wrap for the next frame.
//
// Interface: clk, rst_n (active-low synchronous reset of counters and
// valid flags), pix_valid/pix_in (input stream), out_valid/out_pix (output
// stream), frame_done (one-cycle pulse when the last pixel of a frame is
// accepted). There is no back-pressure: the consumer must accept every
// output.
module image_sharpen
  import r8anbm_pkg::*;
#(
  parameter int unsigned IMG_W = 225,
  parameter int unsigned IMG_H = 225,
  parameter int unsigned N     = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_valid,
  input  logic [7:0] pix_in,
  output logic       out_valid,
  output logic [7:0] out_pix,
  output logic       frame_done
);
  localparam int unsigned CW = $clog2(IMG_W);
  localparam int unsigned RW = $clog2(IMG_H);
  localparam int unsigned PW = 2 * N;      // product width
  localparam int unsigned SW = PW + 5;     // sum of 25 products
  localparam int unsigned RECIP = 3841;    // round(2^20 / 273)

  typedef logic [7:0] pix_t;

  // 5x5 Gaussian weights (sum 273)
  localparam int unsigned GAUSS [5][5] = '{'{1,  4,  7,  4, 1},
                                          '{4, 16, 26, 16, 4},
                                          '{7, 26, 41, 26, 7},
                                          '{4, 16, 26, 16, 4},
                                          '{1,  4,  7,  4, 1}};

  // ---------------------------------------------------------------- position
  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic          last_col, last_row;

  assign last_col = (col == CW'(IMG_W - 1));
  assign last_row = (row == RW'(IMG_H - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col <= '0;
      row <= '0;
    end else if (pix_valid) begin
      if (last_col) begin
        col <= '0;
        row <= last_row ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  assign frame_done = pix_valid && last_col && last_row;

  // the position counters never leave the image
  a_pos_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   (col < CW'(IMG_W)) && (row < RW'(IMG_H)));

  // ---------------------------------------------------------- line buffers
  pix_t tap [5];          // tap[i]: pixel of line row-i at column col
  assign tap[0] = pix_in;

  for (genvar k = 0; k < 4; k++) begin : g_lb
    line_buffer #(.DEPTH(IMG_W), .DW(8)) u_lb (
      .clk    (clk),
      .we     (pix_valid),
      .addr   (col),
      .wr_data(tap[k]),
      .rd_data(tap[k+1])
    );
  end

  // ---------------------------------------------------------- 5x5 window
  // win[i][j] = pixel (row-i, col-j) after the pixel at (row, col) is taken
  pix_t win [5][5];
  logic win_ok;           // window at the last accepted pixel is complete

  always_ff @(posedge clk) begin
    if (pix_valid) begin
      for (int i = 0; i < 5; i++) begin
        win[i][0] <= tap[i];
        for (int j = 1; j < 5; j++) win[i][j] <= win[i][j-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) win_ok <= 1'b0;
    else        win_ok <= pix_valid && (row >= RW'(4)) && (col >= CW'(4));
  end

  // ---------------------------------------------------------- products
  logic [PW-1:0] prod  [5][5];
  logic [PW-1:0] prod_q[5][5];
  pix_t          centre_q;
  logic          prod_ok;

  for (genvar i = 0; i < 5; i++) begin : g_mr
    for (genvar j = 0; j < 5; j++) begin : g_mc
      r8anbm #(.N(N)) u_mul (
        .a(N'(GAUSS[i][j])),
        .b(N'(win[i][j])),
        .p(prod[i][j])
      );
    end
  end

  always_ff @(posedge clk) begin
    prod_q   <= prod;
    centre_q <= win[2][2];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) prod_ok <= 1'b0;
    else        prod_ok <= win_ok;
  end

  // ---------------------------------------------------------- result
  logic signed [SW-1:0]    psum;
  logic signed [SW+12:0]   scaled;
  logic signed [SW+12:0]   blur;
  logic signed [SW+12:0]   sharp;
  pix_t                    result;

  always_comb begin
    psum = '0;
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        psum = psum + SW'($signed(prod_q[i][j]));
    scaled = (SW+13)'(psum) * $signed((SW+13)'(RECIP));
    blur   = scaled >>> 20;
    sharp  = $signed((SW+13)'({1'b0, centre_q, 1'b0})) - blur;
    if (sharp < 0)          result = 8'd0;
    else if (sharp > 255)   result = 8'd255;
    else                    result = sharp[7:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= prod_ok;
      if (prod_ok) out_pix <= result;
    end
  end
endmodule
