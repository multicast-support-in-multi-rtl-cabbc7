// tb_imrr_switch_k2: end-to-end test of three smaller configurations of the switch,
// each driven and scoreboarded by tb_switch_driver:
//   * 6 x 6, RTT = 2, k = 2(RTT+1) = 6 queues per input: the input selector
//     picks the heavier of two queues (queue length + HoL fanout) every slot;
//   * 4 x 4, RTT = 0 (single-chip scheduler), one queue per input;
//   * 8 x 8, RTT = 21, 22 queues per input: a long, odd round trip split
//     unevenly between the request and grant links.
// Counts how often the k-queue selector took the second queue of its pair,
// which can only happen through the weight comparison.
module tb_imrr_switch_k2;
  localparam int unsigned CW = 64;

  logic clk = 0;
  always #5 clk = ~clk;

  // ---- 6 x 6, RTT = 2, two queues per slot
  localparam int unsigned NA = 6;
  logic rst_a;
  logic [NA-1:0] a_in_valid, a_in_last, a_in_ready, a_out_valid;
  logic [CW-1:0] a_in_cell [NA], a_out_cell [NA];
  logic [NA-1:0] a_in_fanout [NA];
  logic [$clog2(NA+1)-1:0] a_match;
  int a_checks, a_fail, a_full, a_lat;
  logic a_done;

  imrr_switch #(.N(NA), .RTT(2), .QPS(2), .CELL_W(CW), .DEPTH(8)) dut_a (
    .clk, .rst_n(rst_a), .in_valid(a_in_valid), .in_cell(a_in_cell), .in_fanout(a_in_fanout),
    .in_last(a_in_last), .in_ready(a_in_ready), .out_valid(a_out_valid), .out_cell(a_out_cell),
    .match_size(a_match));

  tb_switch_driver #(.N(NA), .RTT(2), .QPS(2), .CELL_W(CW), .BCAST_SLOTS(120),
                     .RAND_SLOTS(2000), .PKT_MAX(16), .LOAD_PCT(4)) drv_a (
    .clk, .rst_n(rst_a), .in_valid(a_in_valid), .in_cell(a_in_cell), .in_fanout(a_in_fanout),
    .in_last(a_in_last), .in_ready(a_in_ready), .out_valid(a_out_valid), .out_cell(a_out_cell),
    .match_size(a_match), .checks(a_checks), .failures(a_fail), .n_full_slots(a_full),
    .n_lat_ok(a_lat), .done(a_done));

  // ---- 4 x 4, RTT = 0
  localparam int unsigned NB = 4;
  logic rst_b;
  logic [NB-1:0] b_in_valid, b_in_last, b_in_ready, b_out_valid;
  logic [CW-1:0] b_in_cell [NB], b_out_cell [NB];
  logic [NB-1:0] b_in_fanout [NB];
  logic [$clog2(NB+1)-1:0] b_match;
  int b_checks, b_fail, b_full, b_lat;
  logic b_done;

  imrr_switch #(.N(NB), .RTT(0), .QPS(1), .CELL_W(CW), .DEPTH(8)) dut_b (
    .clk, .rst_n(rst_b), .in_valid(b_in_valid), .in_cell(b_in_cell), .in_fanout(b_in_fanout),
    .in_last(b_in_last), .in_ready(b_in_ready), .out_valid(b_out_valid), .out_cell(b_out_cell),
    .match_size(b_match));

  tb_switch_driver #(.N(NB), .RTT(0), .QPS(1), .CELL_W(CW), .BCAST_SLOTS(100),
                     .RAND_SLOTS(2000), .PKT_MAX(16), .LOAD_PCT(5)) drv_b (
    .clk, .rst_n(rst_b), .in_valid(b_in_valid), .in_cell(b_in_cell), .in_fanout(b_in_fanout),
    .in_last(b_in_last), .in_ready(b_in_ready), .out_valid(b_out_valid), .out_cell(b_out_cell),
    .match_size(b_match), .checks(b_checks), .failures(b_fail), .n_full_slots(b_full),
    .n_lat_ok(b_lat), .done(b_done));

  // ---- 8 x 8, RTT = 21 (uneven split: 11 slots out, 10 back)
  localparam int unsigned NC = 8;
  logic rst_c;
  logic [NC-1:0] c_in_valid, c_in_last, c_in_ready, c_out_valid;
  logic [CW-1:0] c_in_cell [NC], c_out_cell [NC];
  logic [NC-1:0] c_in_fanout [NC];
  logic [$clog2(NC+1)-1:0] c_match;
  int c_checks, c_fail, c_full, c_lat;
  logic c_done;

  imrr_switch #(.N(NC), .RTT(21), .QPS(1), .CELL_W(CW), .DEPTH(8)) dut_c (
    .clk, .rst_n(rst_c), .in_valid(c_in_valid), .in_cell(c_in_cell), .in_fanout(c_in_fanout),
    .in_last(c_in_last), .in_ready(c_in_ready), .out_valid(c_out_valid), .out_cell(c_out_cell),
    .match_size(c_match));

  tb_switch_driver #(.N(NC), .RTT(21), .QPS(1), .CELL_W(CW), .BCAST_SLOTS(250),
                     .RAND_SLOTS(2000), .PKT_MAX(16), .LOAD_PCT(4)) drv_c (
    .clk, .rst_n(rst_c), .in_valid(c_in_valid), .in_cell(c_in_cell), .in_fanout(c_in_fanout),
    .in_last(c_in_last), .in_ready(c_in_ready), .out_valid(c_out_valid), .out_cell(c_out_cell),
    .match_size(c_match), .checks(c_checks), .failures(c_fail), .n_full_slots(c_full),
    .n_lat_ok(c_lat), .done(c_done));

  // second queue of a pair chosen by weight
  int c_second [NA];
  for (genvar i = 0; i < NA; i++) begin : g_w
    initial c_second[i] = 0;
    always @(posedge clk)
      if (rst_a && dut_a.g_in[i].u_is.req_valid && dut_a.g_in[i].u_is.sel_q[0]) c_second[i]++;
  end

  initial begin
    repeat (80000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks + c_checks, a_fail + b_fail + c_fail + 1);
    $finish;
  end

  initial begin
    int f;
    repeat (5) @(posedge clk);
    wait (a_done && b_done && c_done);
    f = a_fail + b_fail + c_fail;
    $display("k-queue selector took the second queue %0d times", c_second.sum());
    if (c_second.sum() == 0 || a_lat == 0 || b_lat == 0 || c_lat == 0 || a_full == 0 || b_full == 0 || c_full == 0) f++;
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks + c_checks + 1, f);
    $finish;
  end
endmodule
