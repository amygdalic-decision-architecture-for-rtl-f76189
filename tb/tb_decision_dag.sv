// tb_decision_dag -- self-checking test of the four-node decision DAG.
//
// Default configuration: node 0 (3 options) reads rows 4 and 5, node 1 (3 options)
// row 6, node 2 (5 options) row 7, node 3 (8 options) row 8. The expected path is
// worked out here with explicit if/else per node; the routing is engage -> node 1,
// intercept_likely -> node 2, any of the four maneuvers -> node 3, everything else
// terminal. Checks: final node and option, visited set, one-hot action at bit
// offset(node) + option (offsets 0, 3, 6, 11), and the two-cycle latency.
// Every terminal depth (1 to 4) must occur.
module tb_decision_dag;
  import amygdala_pkg::*;

  localparam int unsigned N = 50;

  logic clk = 0, rst_n = 0, frame_valid = 0;
  logic [N-1:0][CLS_W-1:0] argmax = '0;
  logic [18:0] action;
  logic [7:0]  final_node, final_opt;
  logic [3:0]  visited;
  logic        out_valid;

  int checks = 0, failures = 0;
  int depth_seen [1:4] = '{0, 0, 0, 0};
  int safe_seen = 0;

  always #5 clk = ~clk;

  decision_dag dut (
    .clk(clk), .rst_n(rst_n), .frame_valid(frame_valid), .argmax(argmax),
    .action(action), .final_node(final_node), .final_opt(final_opt),
    .visited(visited), .out_valid(out_valid));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t FAIL %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    check("reset: root safe option", final_node == 0 && final_opt == 2 && action == 19'b100);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0][7:0] a;
      int o0, o1, o2, o3, en, eo, depth, off;
      logic [3:0] ev;
      for (int r = 0; r < N; r++) a[r] = 8'($urandom);
      a[4] = 8'($urandom_range(0, 2));
      a[5] = 8'($urandom_range(0, 3));
      a[6] = 8'($urandom_range(0, 2));
      a[7] = 8'($urandom_range(0, 5));
      a[8] = (t % 5 == 0) ? 8'($urandom) : 8'($urandom_range(0, 7));
      if (t % 3 != 0) begin a[4] = 0; a[5] = 1; end   // steer towards deep paths
      if (t % 3 == 1) a[6] = 0;
      // node decisions
      if (a[4] == 1) o0 = 1; else if (a[5] == 1) o0 = 0; else if (a[5] == 2) o0 = 1; else o0 = 2;
      if (a[6] == 0) o1 = 0; else if (a[6] == 1) o1 = 1; else o1 = 2;
      if (a[7] <= 3) o2 = int'(a[7]); else o2 = 4;
      if (a[8] <= 7) o3 = int'(a[8]); else o3 = 0;
      if (a[8] > 7 && o0 == 0 && o1 == 0 && o2 < 4) safe_seen++;
      // walk
      if (o0 != 0)      begin en = 0; eo = o0; depth = 1; ev = 4'b0001; end
      else if (o1 != 0) begin en = 1; eo = o1; depth = 2; ev = 4'b0011; end
      else if (o2 == 4) begin en = 2; eo = o2; depth = 3; ev = 4'b0111; end
      else              begin en = 3; eo = o3; depth = 4; ev = 4'b1111; end
      off = (en == 0) ? 0 : (en == 1) ? 3 : (en == 2) ? 6 : 11;
      depth_seen[depth]++;
      argmax      <= a;
      frame_valid <= 1'b1;
      @(posedge clk);
      frame_valid <= 1'b0;
      #1;
      check("no result after one cycle", out_valid == 1'b0);
      @(posedge clk);
      #1;
      check("out_valid two cycles after frame_valid", out_valid == 1'b1);
      check($sformatf("final node %0d opt %0d, expected %0d %0d", final_node, final_opt, en, eo),
            final_node == 8'(en) && final_opt == 8'(eo));
      check("visited", visited == ev);
      check("action one-hot", action == (19'b1 << (off + eo)));
    end
    for (int d = 1; d <= 4; d++) check($sformatf("depth %0d reached", d), depth_seen[d] > 0);
    check("leaf safe route reached", safe_seen > 0);
    $display("depths: %0d %0d %0d %0d, leaf defaults %0d",
             depth_seen[1], depth_seen[2], depth_seen[3], depth_seen[4], safe_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
