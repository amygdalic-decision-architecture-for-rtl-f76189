// tb_spi_argmax_rx -- self-checking test of the SPI argmax receiver.
//
// An SPI master (mode 0, MSB first, SCK = clk/8) sends 50-byte frames of random
// class indices. Checks: every byte lands in its row, frame_valid pulses once,
// 3 clk cycles after CS rises, and the frame takes well under the 1 ms link budget
// at a 12 MHz clk. Malformed frames (short, long, a stray bit) must raise frame_err
// and leave the previous frame on argmax.
module tb_spi_argmax_rx;
  import amygdala_pkg::*;

  localparam int unsigned N = 50;

  logic clk = 0, rst_n = 0;
  logic sck = 0, cs_n = 1, mosi = 0;
  logic [N-1:0][CLS_W-1:0] argmax;
  logic frame_valid, frame_err;

  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  // Cycle monitor: t_cs is the first clk edge that sees CS released, resp_delay the
  // number of edges until an edge sees frame_valid or frame_err.
  logic   cs_prev = 1'b1;
  longint t_cs = 0, resp_delay = 0;
  always @(posedge clk) begin
    cyc++;
    cs_prev <= cs_n;
    if (cs_n && !cs_prev) t_cs = cyc;
    if (frame_valid) n_valid++;
    if (frame_err) n_err++;
    if (frame_valid || frame_err) resp_delay = cyc - t_cs;
  end

  spi_argmax_rx dut (
    .clk(clk), .rst_n(rst_n), .spi_sck(sck), .spi_cs_n(cs_n), .spi_mosi(mosi),
    .argmax(argmax), .frame_valid(frame_valid), .frame_err(frame_err));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t FAIL %s", $time, what);
    end
  endtask

  task automatic send_bits(logic [7:0] b, int nbits);
    for (int i = 7; i > 7 - nbits; i--) begin
      mosi <= b[i];
      repeat (4) @(posedge clk);
      sck <= 1'b1;
      repeat (4) @(posedge clk);
      sck <= 1'b0;
    end
  endtask

  // Sends nbytes bytes plus extra_bits bits; returns the clk cycle of CS release.
  task automatic send_frame(input logic [7:0] bytes [], input int extra_bits, output longint t_rise);
    cs_n <= 1'b0;
    repeat (4) @(posedge clk);
    foreach (bytes[i]) send_bits(bytes[i], 8);
    if (extra_bits > 0) send_bits(8'hA5, extra_bits);
    repeat (4) @(posedge clk);
    cs_n <= 1'b1;
    @(posedge clk);
    t_rise = cyc;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0][7:0] last;
    longint t_start, t_rise;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    check("argmax reset to zero", argmax == '0);
    for (int f = 0; f < 24; f++) begin
      automatic int kind = (f < 8) ? 0 : f % 4;   // 0 good, 1 short, 2 long, 3 stray bit
      automatic int nv0 = n_valid;
      automatic int ne0 = n_err;
      logic [7:0] bytes [];
      case (kind)
        1: bytes = new[N - 1 - (f % 3)];
        2: bytes = new[N + 1];
        default: bytes = new[N];
      endcase
      foreach (bytes[i]) bytes[i] = 8'($urandom);
      t_start = cyc;
      send_frame(bytes, (kind == 3) ? 3 : 0, t_rise);
      // frame_valid is registered in the third clk after CS rises at the pin
      repeat (8) @(posedge clk);
      check($sformatf("response %0d cycles after CS rise", resp_delay), resp_delay == 3);
      #1;
      if (kind == 0) begin
        check("one frame_valid", n_valid == nv0 + 1 && n_err == ne0);
        for (int r = 0; r < N; r++) check($sformatf("row %0d", r), argmax[r] == bytes[r]);
        // 12 MHz clk: 1 ms = 12000 cycles
        check("frame within 1 ms link budget", (cyc - t_start) < 12000);
        last = argmax;
      end else begin
        check("malformed frame flagged", n_err == ne0 + 1 && n_valid == nv0);
        check("previous frame kept", argmax == last);
      end
    end
    $display("good frames %0d, rejected frames %0d", n_valid, n_err);
    check("both outcomes seen", n_valid > 0 && n_err > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
