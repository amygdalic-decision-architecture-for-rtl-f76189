// spi_argmax_rx -- SPI slave that receives one argmax frame from the classifier grid.
//
// The inference processor sends, per camera frame, one 8-bit argmax class index per
// classifier row, row 0 first, over SPI. This receiver is this design's choice of the
// link's details: SPI mode 0 (data sampled on the rising SCK edge), MSB first, one
// frame per chip-select assertion (spi_cs_n low), exactly N bytes per frame. Nothing
// is sent back (no MISO).
//
// How it works: SCK, CS and MOSI are brought into the clk domain with two-flop
// synchronisers; a rising SCK edge shifts in one bit; every eighth bit the byte is
// written into a shadow frame at the current row. When CS is released the frame is
// committed to the argmax output if exactly N whole bytes arrived; otherwise it is
// dropped, frame_err pulses, and the previous frame stays on argmax. The committed
// frame is held stable until the next good frame.
//
// Timing: clk must be at least 4x SCK. frame_valid pulses for one clk cycle, three
// clk cycles after the CS rising edge reaches the clk domain pins (two synchroniser
// flops plus the edge detect).
module spi_argmax_rx
  import amygdala_pkg::*;
#(
  parameter int unsigned N = 50
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    spi_sck,
  input  logic                    spi_cs_n,
  input  logic                    spi_mosi,
  output logic [N-1:0][CLS_W-1:0] argmax,
  output logic                    frame_valid,
  output logic                    frame_err
);

  localparam int unsigned CNT_W = $clog2(N + 2);

  logic [2:0] sck_q, cs_q;     // [0],[1] synchronise, [2] previous value
  logic [1:0] mosi_q;
  logic       sck_rise, cs_rise, cs_active;

  logic [N-1:0][CLS_W-1:0] shadow;
  logic [CLS_W-2:0]        shift;
  logic [2:0]              bit_cnt;
  logic [CNT_W-1:0]        byte_cnt;
  logic                    overrun;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_q  <= '0;
      cs_q   <= '1;
      mosi_q <= '0;
    end else begin
      sck_q  <= {sck_q[1:0], spi_sck};
      cs_q   <= {cs_q[1:0], spi_cs_n};
      mosi_q <= {mosi_q[0], spi_mosi};
    end
  end

  assign sck_rise  = sck_q[1] && !sck_q[2];
  assign cs_rise   = cs_q[1] && !cs_q[2];
  assign cs_active = !cs_q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift       <= '0;
      bit_cnt     <= '0;
      byte_cnt    <= '0;
      overrun     <= 1'b0;
      shadow      <= '0;
      argmax      <= '0;
      frame_valid <= 1'b0;
      frame_err   <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      frame_err   <= 1'b0;
      if (cs_rise) begin
        if (!overrun && bit_cnt == 3'd0 && int'(byte_cnt) == N) begin
          argmax      <= shadow;
          frame_valid <= 1'b1;
        end else begin
          frame_err <= 1'b1;
        end
        bit_cnt  <= '0;
        byte_cnt <= '0;
        overrun  <= 1'b0;
      end else if (cs_active && sck_rise) begin
        shift   <= {shift[CLS_W-3:0], mosi_q[1]};
        bit_cnt <= bit_cnt + 3'd1;
        if (bit_cnt == 3'd7) begin
          if (int'(byte_cnt) < N) begin
            shadow[byte_cnt] <= {shift, mosi_q[1]};
            byte_cnt         <= byte_cnt + CNT_W'(1);
          end else begin
            overrun <= 1'b1;
          end
        end
      end else if (!cs_active) begin
        bit_cnt  <= '0;
        byte_cnt <= '0;
        overrun  <= 1'b0;
      end
    end
  end

  a_single_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(frame_valid && frame_err));

endmodule
