// me_accel_model: behavioural stand-in for the full-pixel motion-estimation
// accelerator, with its port list.  It asks for a current macroblock
// (ctrl_new_cur_mb_out), takes 16 rows of 16 pixels on the 128-bit bus, then
// asks for the reference area and takes 144 rows: three vertical slices of 48
// rows, left slice first.  Each *_stored_out pulses once its data is in.
// After LATENCY cycles it runs a full search over the 33x33 candidate
// positions of the 48x48 area (lowest SAD, first in raster order on a tie),
// raises ctrl_new_result_out and delivers, one word per cycle and only while
// ctrl_target_ready_in is high, the SAD (bits 15..0), the motion vector
// (x in 15..8, y in 7..0, relative to the centre position) and sixteen 4x4
// blocks of the best match in row order (first pixel in bits 127..120).
// ctrl_result_loaded_in ends the operation.  Pixel bit order on the input
// bus is the same as on the output bus.
// The port names, the 128-bit data bus, the input order (current macroblock,
// then three reference slices) and the result order follow the described
// interface; the cycle timing and the search loop are this model's own.
module me_accel_model #(
  parameter int LATENCY = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] me_data_in,
  input  logic         ctrl_valid_ref_data_in,
  input  logic         ctrl_valid_cur_data_in,
  output logic         ctrl_new_ref_area_out,
  output logic         ctrl_new_cur_mb_out,
  output logic         ctrl_ref_area_stored_out,
  output logic         ctrl_cur_mb_stored_out,
  output logic [127:0] me_data_out,
  output logic         ctrl_new_result_out,
  output logic         ctrl_valid_sad_out,
  output logic         ctrl_valid_mv_out,
  output logic         ctrl_valid_mb_out,
  input  logic         ctrl_target_ready_in,
  input  logic         ctrl_repeat_delivery_in,
  input  logic         ctrl_result_loaded_in,
  output int           ops_done,
  output int           errors
);
  logic [7:0] cur [16][16];
  logic [7:0] area [48][48];
  logic [127:0] res [18];
  int state, rows, wait_cnt, idx;

  // state: 0 want cur, 1 want ref, 2 compute, 3 results
  assign ctrl_new_cur_mb_out   = rst_n && state == 0;
  assign ctrl_new_ref_area_out = rst_n && state == 1;
  assign ctrl_new_result_out   = rst_n && state == 3;
  assign me_data_out        = (state == 3 && idx < 18) ? res[idx] : '0;
  assign ctrl_valid_sad_out = state == 3 && ctrl_target_ready_in && idx == 0;
  assign ctrl_valid_mv_out  = state == 3 && ctrl_target_ready_in && idx == 1;
  assign ctrl_valid_mb_out  = state == 3 && ctrl_target_ready_in && idx >= 2 && idx < 18;

  task automatic search();
    int best, bx, by;
    best = 1 << 30; bx = 0; by = 0;
    for (int y = 0; y <= 32; y++)
      for (int x = 0; x <= 32; x++) begin
        int s;
        s = 0;
        for (int r = 0; r < 16; r++)
          for (int c = 0; c < 16; c++) begin
            int d;
            d = int'(area[y+r][x+c]) - int'(cur[r][c]);
            s += (d < 0) ? -d : d;
          end
        if (s < best) begin best = s; bx = x; by = y; end
      end
    res[0] = 128'(best[15:0]);
    res[1] = 128'({8'(bx - 16), 8'(by - 16)});
    for (int b = 0; b < 16; b++)
      for (int k = 0; k < 16; k++)
        res[2+b][127-8*k -: 8] = area[by + 4*(b/4) + k/4][bx + 4*(b%4) + k%4];
  endtask

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= 0; rows <= 0; wait_cnt <= 0; idx <= 0; ops_done <= 0; errors <= 0;
      ctrl_cur_mb_stored_out <= 1'b0; ctrl_ref_area_stored_out <= 1'b0;
    end else begin
      ctrl_cur_mb_stored_out   <= 1'b0;
      ctrl_ref_area_stored_out <= 1'b0;
      if (ctrl_valid_cur_data_in) begin
        if (state != 0) errors <= errors + 1;
        else begin
          for (int k = 0; k < 16; k++) cur[rows][k] = me_data_in[127-8*k -: 8];
          if (rows == 15) begin rows <= 0; state <= 1; ctrl_cur_mb_stored_out <= 1'b1; end
          else rows <= rows + 1;
        end
      end
      if (ctrl_valid_ref_data_in) begin
        if (state != 1) errors <= errors + 1;
        else begin
          for (int k = 0; k < 16; k++) area[rows % 48][16*(rows/48) + k] = me_data_in[127-8*k -: 8];
          if (rows == 143) begin
            rows <= 0; state <= 2; wait_cnt <= 0; ctrl_ref_area_stored_out <= 1'b1;
          end else rows <= rows + 1;
        end
      end
      if (state == 2) begin
        wait_cnt <= wait_cnt + 1;
        if (wait_cnt == LATENCY) begin
          search();
          state <= 3; idx <= 0;
        end
      end
      if (state == 3) begin
        if (ctrl_target_ready_in && idx < 18) idx <= idx + 1;
        if (ctrl_repeat_delivery_in) idx <= 0;
        if (ctrl_result_loaded_in) begin
          if (idx != 18) errors <= errors + 1;
          state <= 0; ops_done <= ops_done + 1;
        end
      end
    end
  end
endmodule
