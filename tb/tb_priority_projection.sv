// tb_priority_projection -- self-checking test of the priority projection pi.
//
// Random sparse hit vectors over 50 rows; the expected winner is found by isolating
// the lowest set bit (x & -x) and taking its position, a different method from the
// module's priority loop. An all-zero hit vector must give the safe option.
module tb_priority_projection;
  import amygdala_pkg::*;

  localparam int unsigned N = 50;
  localparam logic [7:0]  SAFE = 8'd2;

  logic [N-1:0]            row_hit;
  logic [N-1:0][OPT_W-1:0] row_opt;
  logic [OPT_W-1:0]        opt;
  logic [ROW_W-1:0]        sel_row;
  logic                    used_default;

  int checks = 0, failures = 0;

  priority_projection dut (
    .row_hit(row_hit), .row_opt(row_opt), .opt(opt), .sel_row(sel_row),
    .used_default(used_default));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int defaults = 0, overrides = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] low;
      int           win;
      row_hit = '0;
      for (int r = 0; r < N; r++) begin
        row_opt[r] = 8'($urandom);
        if ($urandom_range(0, 15) == 0) row_hit[r] = 1'b1;
      end
      if (t % 10 == 0) row_hit = '0;
      #1;
      low = row_hit & (~row_hit + 1'b1);
      win = (low == 0) ? -1 : $clog2(low);
      checks++;
      if (win < 0) begin
        defaults++;
        if (opt !== SAFE || used_default !== 1'b1 || sel_row !== 8'd0) begin
          failures++;
          $display("no hit: opt %0d default %0b", opt, used_default);
        end
      end else begin
        if ($countones(row_hit) > 1) overrides++;
        if (opt !== row_opt[win] || used_default !== 1'b0 || sel_row !== 8'(win)) begin
          failures++;
          if (failures < 10)
            $display("hits %h: opt %0d row %0d, expected %0d row %0d",
                     row_hit, opt, sel_row, row_opt[win], win);
        end
      end
    end
    checks++;
    if (defaults == 0 || overrides == 0) failures++;
    $display("defaults %0d, multi-row conflicts %0d", defaults, overrides);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
