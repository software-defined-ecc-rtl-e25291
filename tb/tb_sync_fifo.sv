// tb_sync_fifo: self-checking test of the FIFO used for all controller queues.
// Random push/pop traffic on a depth-5 FIFO of 16-bit words is compared with
// a queue model: data order, count, full (in_ready low only when full and not
// popping) and empty. A second instance with a struct element type checks the
// type parameter.
module tb_sync_fifo;
  import sdecc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [2:0] count;
  txn_t t_in, t_out;
  logic t_iv, t_ir, t_ov, t_or;
  logic [1:0] t_cnt;
  logic [15:0] model [$];
  int full_seen = 0;

  sync_fifo #(.T(logic [15:0]), .DEPTH(5)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .count);
  sync_fifo #(.T(txn_t), .DEPTH(2)) dut_t (.clk, .rst_n, .in_valid(t_iv), .in_ready(t_ir),
    .in_data(t_in), .out_valid(t_ov), .out_ready(t_or), .out_data(t_out), .count(t_cnt));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0; t_iv = 0; t_or = 0; t_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(99) < ((n / 2000) % 2 ? 80 : 40));
      out_ready = ($urandom_range(99) < ((n / 2000) % 2 ? 30 : 70));
      in_data   = 16'($urandom);
      #1;
      check(count == 3'(model.size()), "count");
      check(out_valid == (model.size() != 0), "out_valid is not-empty");
      check(in_ready == (model.size() < 5 || out_ready), "in_ready is not-full or popping");
      if (out_valid) check(out_data == model[0], "head data");
      if (model.size() == 5) full_seen++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    check(full_seen > 0, "FIFO was filled");
    // struct element type
    @(negedge clk);
    t_in = '{tag: 8'h5A, we: 1'b0, prefetch: 1'b1, retried: 1'b0, laddr: 30'h1234567};
    t_iv = 1;
    @(negedge clk);
    t_in.tag = 8'hA5;
    @(negedge clk);
    t_iv = 0;
    check(t_cnt == 2 && !t_ir, "struct FIFO full");
    check(t_ov && t_out.tag == 8'h5A && t_out.prefetch && t_out.laddr == 30'h1234567, "struct head");
    t_or = 1;
    @(negedge clk);
    check(t_out.tag == 8'hA5, "struct second");
    @(negedge clk);
    check(!t_ov, "struct empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
