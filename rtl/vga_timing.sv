// vga_timing: 640x480 raster timing from the 50 MHz system clock.
//
// The pixel rate is half the system clock: phase toggles every clock, pix_ce is
// high in every second cycle and marks the clock edge at which the raster
// advances by one pixel, and vga_clk (the same toggle, 25 MHz) goes to the
// video DAC; it rises in the middle of each pixel. h_count runs 0..H_TOTAL-1
// and v_count 0..V_TOTAL-1, origin at the top-left visible pixel, x to the
// right and y downwards. active is high inside the 640x480 picture; hsync_n and
// vsync_n are low during the sync pulses. All three are decoded from the
// counters (no added delay), so a user registers them together with its pixel.
// 640x480 and the 25 MHz pixel clock made by dividing the 50 MHz clock come
// from the design; the porch and sync widths are the standard 640x480 at 60 Hz
// values, and a clock enable is used instead of a second clock domain.
module vga_timing #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       pix_ce,
  output logic       vga_clk,
  output logic [9:0] h_count,
  output logic [9:0] v_count,
  output logic       active,
  output logic       hsync_n,
  output logic       vsync_n
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= 1'b0;
      h_count <= '0;
      v_count <= '0;
    end else begin
      phase_q <= ~phase_q;
      if (phase_q) begin
        if (h_count == 10'(H_TOTAL - 1)) begin
          h_count <= '0;
          v_count <= (v_count == 10'(V_TOTAL - 1)) ? '0 : v_count + 10'd1;
        end else begin
          h_count <= h_count + 10'd1;
        end
      end
    end
  end

  assign pix_ce  = phase_q;
  assign vga_clk = phase_q;
  assign active  = (h_count < 10'(H_ACTIVE)) && (v_count < 10'(V_ACTIVE));
  assign hsync_n = !((h_count >= 10'(H_ACTIVE + H_FP)) && (h_count < 10'(H_ACTIVE + H_FP + H_SYNC)));
  assign vsync_n = !((v_count >= 10'(V_ACTIVE + V_FP)) && (v_count < 10'(V_ACTIVE + V_FP + V_SYNC)));

endmodule
