// tb_feature_store: an 8-deep store under random pushes and pops (only when
// a record is available), against a queue model. Covers full-and-drop,
// simultaneous push and pop when full, the sticky overflow flag, and
// draining to empty.
module tb_feature_store;
  import sift_pkg::*;
  localparam int D = 8;
  int checks = 0, failures = 0, n_drop = 0, n_full_rw = 0;

  logic clk = 0, rst_n = 0, wr = 0, rd = 0;
  kp_rec_t wr_rec = '0, rd_rec;
  logic avail, overflow;
  logic [$clog2(D+1)-1:0] count;
  kp_rec_t model[$];
  bit ovf_model = 0;

  feature_store #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks += 3;
    if (avail != (model.size() != 0)) begin
      failures++; $display("FAIL avail");
    end
    if (int'(count) != model.size()) begin
      failures++; $display("FAIL count %0d vs %0d", count, model.size());
    end
    if (overflow != ovf_model) begin
      failures++; $display("FAIL overflow flag");
    end
    if (model.size() != 0) begin
      checks++;
      if (rd_rec != model[0]) begin
        failures++; $display("FAIL head record");
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      automatic int phase = (t / 500) % 3;   // 0 fill, 1 mixed, 2 drain
      automatic bit do_w, do_r;
      @(negedge clk);
      check_state();
      do_w = (phase == 0) ? ($urandom_range(0, 3) != 0) : (phase == 1) ? $urandom_range(0, 1) : ($urandom_range(0, 5) == 0);
      do_r = (model.size() != 0) && avail && ((phase == 0) ? ($urandom_range(0, 5) == 0) : (phase == 1) ? $urandom_range(0, 1) : 1'b1);
      wr = do_w; rd = do_r;
      wr_rec = kp_rec_t'({$urandom, $urandom});
      // model of this clock edge
      if (do_w && model.size() == D && do_r) n_full_rw++;
      if (do_r) void'(model.pop_front());
      if (do_w) begin
        if (model.size() < D) model.push_back(wr_rec);
        else begin ovf_model = 1; n_drop++; end
      end
    end
    @(negedge clk);
    wr = 0; rd = 0;
    check_state();
    checks++;
    if (n_drop == 0 || n_full_rw == 0) begin
      failures++; $display("FAIL coverage drop=%0d fullrw=%0d", n_drop, n_full_rw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
