// tb_amygdala_top -- end-to-end test of the FPGA pipeline at its default size.
//
// The testbench plays the inference processor: for every frame it draws a score per
// class for each of the 50 classifier rows, takes each row's argmax with the lowest
// class index winning ties, and sends the 50 bytes over SPI (mode 0, MSB first,
// SCK = clk/8). It then checks the single-node option pins and the decision DAG's
// final action against reference models written here from the default tables'
// meaning. Malformed frames (a missing byte) are mixed in and must change nothing.
//
// Timing checks, with clk taken as 12 MHz: CS release to act_valid 4 cycles and to
// dag_valid 5 cycles (lookup well under 0.1 ms); one whole frame on the link under
// 1 ms (12000 cycles). Mechanisms counted, each must occur at least once: explicit
// table hit, safe default, conflict resolved by row priority, argmax tie broken to
// the lowest index, rejected frame, and DAG paths ending at depth 1, 2, 3 and 4.
module tb_amygdala_top;
  import amygdala_pkg::*;

  localparam int unsigned N = 50;

  logic clk = 0, rst_n = 0;
  logic sck = 0, cs_n = 1, mosi = 0;
  logic        frame_valid, frame_err;
  logic [3:0]  act_drive;
  logic [7:0]  act_opt, act_row;
  logic        act_default, act_valid;
  logic [18:0] dag_action;
  logic [7:0]  dag_final_node, dag_final_opt;
  logic [3:0]  dag_visited;
  logic        dag_valid;

  amygdala_top dut (
    .clk(clk), .rst_n(rst_n), .spi_sck(sck), .spi_cs_n(cs_n), .spi_mosi(mosi),
    .frame_valid(frame_valid), .frame_err(frame_err),
    .act_drive(act_drive), .act_opt(act_opt), .act_row(act_row),
    .act_default(act_default), .act_valid(act_valid),
    .dag_action(dag_action), .dag_final_node(dag_final_node),
    .dag_final_opt(dag_final_opt), .dag_visited(dag_visited), .dag_valid(dag_valid));

  int checks = 0, failures = 0;
  int n_explicit = 0, n_default = 0, n_conflict = 0, n_tie = 0, n_reject = 0;
  int depth_seen [1:4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  // cycle monitor
  longint cyc = 0, t_cs = 0, act_delay = 0, dag_delay = 0;
  int     n_act = 0, n_dag = 0, n_err = 0;
  logic   cs_prev = 1'b1;
  always @(posedge clk) begin
    cyc++;
    cs_prev <= cs_n;
    if (cs_n && !cs_prev) t_cs = cyc;
    if (act_valid) begin n_act++; act_delay = cyc - t_cs; end
    if (dag_valid) begin n_dag++; dag_delay = cyc - t_cs; end
    if (frame_err) n_err++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t FAIL %s", $time, what);
    end
  endtask

  task automatic send_byte(logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      mosi <= b[i];
      repeat (4) @(posedge clk);
      sck <= 1'b1;
      repeat (4) @(posedge clk);
      sck <= 1'b0;
    end
  endtask

  // Row argmax of the inference side: lowest class index wins a tie.
  function automatic logic [7:0] row_argmax(int scores [], output bit tie);
    int best = 0;
    tie = 0;
    for (int k = 1; k < scores.size(); k++) begin
      if (scores[k] > scores[best]) begin best = k; tie = 0; end
      else if (scores[k] == scores[best]) tie = 1;
    end
    return 8'(best);
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int K [N];
    logic [N-1:0][7:0] a;
    logic [7:0] last_opt;
    logic [18:0] last_action;
    last_opt = 8'd2;
    last_action = 19'b100;
    for (int r = 0; r < N; r++) K[r] = (r < 9) ? 6 : $urandom_range(2, 256);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    check("reset: safe option on the pins", act_drive == 4'b0100 && dag_action == 19'b100);

    for (int f = 0; f < 240; f++) begin
      automatic bit bad = (f % 10 == 9);
      automatic int nact0 = n_act, ndag0 = n_dag, nerr0 = n_err;
      int eo, er, o0, o1, o2, o3, en, en_o, depth, off, hits;
      bit ed;
      longint t0;
      // inference side: scores, argmax with tie-break
      for (int r = 0; r < N; r++) begin
        automatic int sc [] = new[K[r]];
        bit tie;
        foreach (sc[k]) sc[k] = (r < 9) ? $urandom_range(0, 7) : $urandom_range(0, 1000);
        // steer some frames down the DAG: favour engage, intercept_likely
        if (f % 2 == 0 && r == 4) sc[0] += 8;
        if (f % 2 == 0 && r == 5) sc[1] += 8;
        if (f % 4 == 0 && r == 6) sc[0] += 8;
        a[r] = row_argmax(sc, tie);
        if (tie) n_tie++;
      end
      // single-node reference (quality-control table)
      ed = 0;
      if (a[0] == 1)                   begin eo = 3; er = 0; end
      else if (a[1] == 1 || a[1] == 2) begin eo = 1; er = 1; end
      else if (a[1] == 3)              begin eo = 2; er = 1; end
      else if (a[2] == 1)              begin eo = 1; er = 2; end
      else if (a[3] == 0)              begin eo = 0; er = 3; end
      else if (a[3] == 1)              begin eo = 1; er = 3; end
      else                             begin eo = 2; er = 0; ed = 1; end
      hits = int'(a[0] == 1) + int'(a[1] inside {[1:3]}) + int'(a[2] == 1) + int'(a[3] <= 1);
      // DAG reference
      if (a[4] == 1) o0 = 1; else if (a[5] == 1) o0 = 0; else if (a[5] == 2) o0 = 1; else o0 = 2;
      if (a[6] == 0) o1 = 0; else if (a[6] == 1) o1 = 1; else o1 = 2;
      if (a[7] <= 3) o2 = int'(a[7]); else o2 = 4;
      if (a[8] <= 7) o3 = int'(a[8]); else o3 = 0;
      if (o0 != 0)      begin en = 0; en_o = o0; depth = 1; end
      else if (o1 != 0) begin en = 1; en_o = o1; depth = 2; end
      else if (o2 == 4) begin en = 2; en_o = o2; depth = 3; end
      else              begin en = 3; en_o = o3; depth = 4; end
      off = (en == 0) ? 0 : (en == 1) ? 3 : (en == 2) ? 6 : 11;

      // send
      t0 = cyc;
      cs_n <= 1'b0;
      repeat (4) @(posedge clk);
      for (int r = 0; r < (bad ? N - 1 : N); r++) send_byte(a[r]);
      repeat (4) @(posedge clk);
      cs_n <= 1'b1;
      repeat (10) @(posedge clk);
      #1;
      if (bad) begin
        n_reject++;
        check("rejected frame flagged", n_err == nerr0 + 1);
        check("rejected frame: no new decision", n_act == nact0 && n_dag == ndag0);
        check("rejected frame: pins unchanged", act_opt == last_opt && dag_action == last_action);
        continue;
      end
      check("link frame under 1 ms", (cyc - t0) < 12000);
      check("one decision per frame", n_act == nact0 + 1 && n_dag == ndag0 + 1);
      check($sformatf("act latency %0d", act_delay), act_delay == 4);
      check($sformatf("dag latency %0d", dag_delay), dag_delay == 5);
      check($sformatf("frame %0d option %0d expected %0d", f, act_opt, eo), act_opt == 8'(eo));
      check("deciding row", act_row == 8'(er) && act_default == ed);
      check("pins one-hot on the option", act_drive == (4'b1 << eo));
      check($sformatf("dag %0d/%0d expected %0d/%0d", dag_final_node, dag_final_opt, en, en_o),
            dag_final_node == 8'(en) && dag_final_opt == 8'(en_o));
      check("dag action bit", dag_action == (19'b1 << (off + en_o)));
      if (ed) n_default++; else n_explicit++;
      if (hits > 1) n_conflict++;
      depth_seen[depth]++;
      last_opt = act_opt;
      last_action = dag_action;
    end

    $display("explicit %0d default %0d conflicts %0d ties %0d rejected %0d depths %0d %0d %0d %0d",
             n_explicit, n_default, n_conflict, n_tie, n_reject,
             depth_seen[1], depth_seen[2], depth_seen[3], depth_seen[4]);
    check("explicit hit seen", n_explicit > 0);
    check("safe default seen", n_default > 0);
    check("priority conflict seen", n_conflict > 0);
    check("argmax tie seen", n_tie > 0);
    check("rejected frame seen", n_reject > 0);
    for (int d = 1; d <= 4; d++) check($sformatf("dag depth %0d seen", d), depth_seen[d] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
