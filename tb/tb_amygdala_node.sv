// tb_amygdala_node -- self-checking test of one amygdala node (A = f o pi + pins).
//
// dut uses the default quality-control table. The expected option is computed here
// from the table's meaning, row by row in priority order, with flag_human (2) as the
// safe option. Checks: option index, deciding row, default flag, one-hot pins, reset
// value and the one-cycle latency from frame_valid to out_valid. A second instance
// (dut_bad) carries a table entry that names option 9 of a 4-option node; it must be
// replaced by the safe option.
module tb_amygdala_node;
  import amygdala_pkg::*;

  localparam int unsigned N = 50;

  logic clk = 0, rst_n = 0, frame_valid = 0;
  logic [N-1:0][CLS_W-1:0] argmax = '0;
  logic [3:0] act_drive, bad_drive;
  logic [7:0] opt_idx, sel_row, bad_opt, bad_row;
  logic used_default, out_valid, bad_default, bad_valid;

  localparam lut_entry_t [0:1] BAD_TABLE = '{'{1'b1, 8'd0, 8'd5, 8'd9},
                                             '{1'b1, 8'd1, 8'd5, 8'd1}};

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  amygdala_node dut (
    .clk(clk), .rst_n(rst_n), .frame_valid(frame_valid), .argmax(argmax),
    .act_drive(act_drive), .opt_idx(opt_idx), .sel_row(sel_row),
    .used_default(used_default), .out_valid(out_valid));

  amygdala_node #(.N(N), .M(4), .NUM_ENTRIES(2), .ENTRIES(BAD_TABLE), .SAFE_OPT(8'd2)) dut_bad (
    .clk(clk), .rst_n(rst_n), .frame_valid(frame_valid), .argmax(argmax),
    .act_drive(bad_drive), .opt_idx(bad_opt), .sel_row(bad_row),
    .used_default(bad_default), .out_valid(bad_valid));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t FAIL %s", $time, what);
    end
  endtask

  function automatic void reference(input logic [N-1:0][7:0] a, output logic [7:0] o,
                                    output logic [7:0] row, output logic dflt);
    dflt = 1'b0;
    if (a[0] == 1)                    begin o = 3; row = 0; end
    else if (a[1] == 1 || a[1] == 2)  begin o = 1; row = 1; end
    else if (a[1] == 3)               begin o = 2; row = 1; end
    else if (a[2] == 1)               begin o = 1; row = 2; end
    else if (a[3] == 0)               begin o = 0; row = 3; end
    else if (a[3] == 1)               begin o = 1; row = 3; end
    else                              begin o = 2; row = 0; dflt = 1'b1; end
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_default = 0, n_explicit = 0, n_conflict = 0, n_clamp = 0;
    repeat (3) @(posedge clk);
    check("reset selects safe option", opt_idx == 8'd2 && act_drive == 4'b0100 && !out_valid);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0][7:0] a;
      logic [7:0] eo, er;
      logic ed;
      int hits;
      for (int r = 0; r < N; r++) a[r] = 8'($urandom_range(0, 5));
      if (t % 7 == 0) a[0] = 8'd5;
      reference(a, eo, er, ed);
      hits = int'(a[0] == 1) + int'(a[1] inside {[1:3]}) + int'(a[2] == 1) + int'(a[3] <= 1);
      if (hits > 1) n_conflict++;
      if (ed) n_default++; else n_explicit++;
      argmax      <= a;
      frame_valid <= 1'b1;
      @(posedge clk);
      frame_valid <= 1'b0;
      argmax      <= '1;       // changing input after the frame must not matter
      #1;
      check("out_valid one cycle after frame_valid", out_valid == 1'b1);
      check($sformatf("option %0d expected %0d", opt_idx, eo), opt_idx == eo);
      check("deciding row", sel_row == er);
      check("default flag", used_default == ed);
      check("one-hot pins", act_drive == (4'b1 << eo));
      if (a[0] == 5) begin
        n_clamp++;
        check("out-of-set entry replaced by safe option",
              bad_opt == 8'd2 && bad_default && bad_drive == 4'b0100);
      end
      @(posedge clk);
      #1;
      check("out_valid is a single pulse", out_valid == 1'b0);
      check("output holds between frames", opt_idx == eo);
    end
    check("every mechanism seen", n_default > 0 && n_explicit > 0 && n_conflict > 0 && n_clamp > 0);
    $display("explicit %0d default %0d conflicts %0d clamps %0d", n_explicit, n_default, n_conflict, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
