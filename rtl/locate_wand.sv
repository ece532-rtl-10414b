// locate_wand: finds the centre of the wand tip in one video frame.
//
// Every pixel of the RGB stream is tested for the wand colour with
//   P^2 - Q^2 - R^2 - Colour_Norm > 0
// where P is the component of the selected colour (red, green or blue) and
// Q, R are the other two; a larger Colour_Norm demands a purer colour. The
// test is computed exactly on 8-bit components in 19-bit signed arithmetic.
//
// Stray specks are rejected by cluster size: a cluster is a horizontal run
// of consecutive wand-coloured pixels in one line, and only runs of at least
// Ignore_Pixels pixels count (0 or 1 accepts every pixel). Once a run is long
// enough, its first pixel and every further pixel widen the bounding box:
// leftmost and rightmost x, uppermost and lowermost y. At the end of the
// frame the centre is X = (left + right) / 2, Y = (top + bottom) / 2, with
// the sum taken at 17 bits and truncated.
//
// Control: a start pulse latches the configuration and arms the block. The
// next frame_start (vertical sync) clears the box and begins the search; the
// frame_start after that ends it, loads result and pulses done for one
// clock. result holds until the next search ends. A start while a search is
// running restarts it. If no run qualified, the result reports left = top =
// 0xFFFF, right = bottom = 0 (left > right), and the centre is computed from
// those values.
//
// The colour equation, the bounding-box search, the centre formulas and the
// Go/Vsync/Done sequence follow the document. How a cluster is measured,
// the empty-frame result and the treatment of colour code 3 (as red) are
// this design's own choices.
module locate_wand
  import idio_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  wand_cfg_t    cfg,
  input  logic         frame_start,
  input  logic         pix_valid,
  input  rgb_t         pix_rgb,
  input  coord_t       pix_x,
  input  coord_t       pix_y,
  output logic         busy,
  output logic         done,
  output wand_result_t result
);

  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_RUN} lw_state_e;
  lw_state_e state;

  wand_cfg_t cfg_q;

  // ---- colour test ----
  logic [7:0]         prim, oth1, oth2;
  logic [15:0]        sq_p, sq_1, sq_2;
  logic signed [18:0] score;
  logic               is_wand;

  always_comb begin
    unique case (cfg_q.colour)
      2'(COL_GREEN): begin prim = pix_rgb.g; oth1 = pix_rgb.r; oth2 = pix_rgb.b; end
      2'(COL_BLUE):  begin prim = pix_rgb.b; oth1 = pix_rgb.r; oth2 = pix_rgb.g; end
      default:       begin prim = pix_rgb.r; oth1 = pix_rgb.g; oth2 = pix_rgb.b; end
    endcase
    sq_p  = 16'(prim) * 16'(prim);
    sq_1  = 16'(oth1) * 16'(oth1);
    sq_2  = 16'(oth2) * 16'(oth2);
    score = $signed({3'b000, sq_p}) - $signed({3'b000, sq_1})
          - $signed({3'b000, sq_2}) - $signed({3'b000, cfg_q.colour_norm});
    is_wand = (score > 0);
  end

  // ---- cluster (run) tracking ----
  logic [IGN_W-1:0] run_len, run_len_nx;
  coord_t           run_start, run_start_nx;
  logic             run_ok;
  coord_t           left, right, top, bottom;

  always_comb begin
    run_len_nx   = run_len;
    run_start_nx = run_start;
    if (!is_wand) begin
      run_len_nx = '0;
    end else if (pix_x == '0 || run_len == '0) begin
      run_len_nx   = 1;
      run_start_nx = pix_x;
    end else if (run_len != '1) begin
      run_len_nx = run_len + 1'b1;
    end
    run_ok = is_wand && (run_len_nx >= cfg_q.ignore_pixels);
  end

  logic [COORD_W:0] sum_x, sum_y;
  assign sum_x = {1'b0, left} + {1'b0, right};
  assign sum_y = {1'b0, top}  + {1'b0, bottom};

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      cfg_q     <= '0;
      run_len   <= '0;
      run_start <= '0;
      left <= '1; right <= '0; top <= '1; bottom <= '0;
      done      <= 1'b0;
      result    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: ;
        S_ARMED: if (frame_start) begin
          state   <= S_RUN;
          run_len <= '0;
          left <= '1; right <= '0; top <= '1; bottom <= '0;
        end
        S_RUN: begin
          if (frame_start) begin
            state         <= S_IDLE;
            done          <= 1'b1;
            result.left   <= left;
            result.right  <= right;
            result.top    <= top;
            result.bottom <= bottom;
            result.x      <= coord_t'(sum_x >> 1);
            result.y      <= coord_t'(sum_y >> 1);
          end else if (pix_valid) begin
            run_len   <= run_len_nx;
            run_start <= run_start_nx;
            if (run_ok) begin
              if (run_start_nx < left) left   <= run_start_nx;
              if (pix_x > right)       right  <= pix_x;
              if (pix_y < top)         top    <= pix_y;
              if (pix_y > bottom)      bottom <= pix_y;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
      if (start) begin
        state <= S_ARMED;
        cfg_q <= cfg;
      end
    end
  end

  assign busy = (state != S_IDLE);

endmodule
