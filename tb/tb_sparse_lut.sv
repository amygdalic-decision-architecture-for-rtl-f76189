// tb_sparse_lut -- self-checking test of the sparse lookup table f.
//
// Uses the default 50-row quality-control table. The expected per-row hits are
// written out here by hand from the table's meaning (hazard row 0, defect row 1,
// orientation row 2, completeness row 3), not read from the module's parameter.
// Frames are random, with class values biased towards 0..4 so that entries hit.
module tb_sparse_lut;
  import amygdala_pkg::*;

  localparam int unsigned N = 50;

  logic [N-1:0][CLS_W-1:0] argmax;
  logic [N-1:0]            row_hit;
  logic [N-1:0][OPT_W-1:0] row_opt;

  int checks = 0, failures = 0;

  sparse_lut dut (.argmax(argmax), .row_hit(row_hit), .row_opt(row_opt));

  function automatic void expect_row(int r, logic [7:0] c, output logic hit, output logic [7:0] o);
    hit = 1'b0; o = 8'd0;
    case (r)
      0: if (c == 1) begin hit = 1; o = 8'd3; end
      1: if (c == 1 || c == 2) begin hit = 1; o = 8'd1; end
         else if (c == 3) begin hit = 1; o = 8'd2; end
      2: if (c == 1) begin hit = 1; o = 8'd1; end
      3: if (c == 0) begin hit = 1; o = 8'd0; end
         else if (c == 1) begin hit = 1; o = 8'd1; end
      default: ;
    endcase
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits_seen = 0;
    for (int t = 0; t < 2000; t++) begin
      for (int r = 0; r < N; r++)
        argmax[r] = (t % 3 == 0) ? 8'($urandom) : 8'($urandom_range(0, 4));
      #1;
      for (int r = 0; r < N; r++) begin
        logic h; logic [7:0] o;
        expect_row(r, argmax[r], h, o);
        checks++;
        if (row_hit[r] !== h || (h && row_opt[r] !== o)) begin
          failures++;
          if (failures < 10)
            $display("row %0d class %0d: hit %0b opt %0d, expected %0b %0d",
                     r, argmax[r], row_hit[r], row_opt[r], h, o);
        end
        if (h) hits_seen++;
      end
    end
    checks++;
    if (hits_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
