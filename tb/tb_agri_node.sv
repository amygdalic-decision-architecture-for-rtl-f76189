// tb_agri_node -- a five-option amygdala node for offline crop monitoring.
//
// Builds amygdala_node with the agricultural option set {0 alert_disease,
// 1 alert_pest, 2 ready_harvest, 3 irrigate, 4 no_action}, no_action being the safe
// option, and an example table over four classifier rows in priority order:
//   row 0 disease  : class 1, 2 -> alert_disease
//   row 1 pest     : class 1    -> alert_pest
//   row 2 harvest  : class 1    -> ready_harvest
//   row 3 moisture : class 0    -> irrigate
// The expected option is written out here with if/else; every option and the safe
// route must be selected at least once, with exactly one of the five pins high.
module tb_agri_node;
  import amygdala_pkg::*;

  localparam int unsigned N = 50;
  localparam lut_entry_t [0:4] AGRI_TABLE = '{
    '{1'b1, 8'd0, 8'd1, 8'd0},
    '{1'b1, 8'd0, 8'd2, 8'd0},
    '{1'b1, 8'd1, 8'd1, 8'd1},
    '{1'b1, 8'd2, 8'd1, 8'd2},
    '{1'b1, 8'd3, 8'd0, 8'd3}};

  logic clk = 0, rst_n = 0, frame_valid = 0;
  logic [N-1:0][CLS_W-1:0] argmax = '0;
  logic [4:0] act_drive;
  logic [7:0] opt_idx, sel_row;
  logic used_default, out_valid;

  int checks = 0, failures = 0;
  int seen [5] = '{0, 0, 0, 0, 0};

  always #5 clk = ~clk;

  amygdala_node #(.N(N), .M(5), .NUM_ENTRIES(5), .ENTRIES(AGRI_TABLE), .SAFE_OPT(8'd4)) dut (
    .clk(clk), .rst_n(rst_n), .frame_valid(frame_valid), .argmax(argmax),
    .act_drive(act_drive), .opt_idx(opt_idx), .sel_row(sel_row),
    .used_default(used_default), .out_valid(out_valid));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t FAIL %s", $time, what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    check("reset: no_action", act_drive == 5'b10000);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 1000; t++) begin
      logic [N-1:0][7:0] a;
      int eo;
      for (int r = 0; r < N; r++) a[r] = 8'($urandom_range(0, 3));
      if (t % 2 == 0) begin a[0] = 0; a[1] = 0; end
      if (t % 4 == 0) a[2] = 0;
      if (a[0] == 1 || a[0] == 2) eo = 0;
      else if (a[1] == 1)         eo = 1;
      else if (a[2] == 1)         eo = 2;
      else if (a[3] == 0)         eo = 3;
      else                        eo = 4;
      seen[eo]++;
      argmax      <= a;
      frame_valid <= 1'b1;
      @(posedge clk);
      frame_valid <= 1'b0;
      #1;
      check($sformatf("option %0d expected %0d", opt_idx, eo), out_valid && opt_idx == 8'(eo));
      check("pins", act_drive == (5'b1 << eo) && used_default == (eo == 4));
      @(posedge clk);
    end
    for (int o = 0; o < 5; o++) check($sformatf("option %0d selected", o), seen[o] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
