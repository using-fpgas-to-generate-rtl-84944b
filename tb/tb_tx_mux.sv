// tb_tx_mux: self-checking test of the transmit arbiter and MAC client.
// Two sources hold queues of complete frames (first byte tags the source).
// A MAC model acknowledges each frame start after a random delay and then
// requires a byte on every cycle up to the end of the frame. Checks the
// frames arrive intact, the state-machine:CPU order follows the mix ratio
// (ratio 0 gives S C S C, ratio 2 gives S S S C) while both wait, and a lone
// source is served.
module tb_tx_mux;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic [15:0] ratio;
  pkt_beat_t sm_beat, cpu_beat;
  logic sm_valid, sm_ready, cpu_valid, cpu_ready;
  logic [7:0] mac_tx_data;
  logic mac_tx_dv, mac_tx_sop, mac_tx_eop, mac_tx_ack;
  logic stat_sm_frame, stat_cpu_frame, stat_underrun;

  tx_mux dut (.*);

  int checks = 0, failures = 0;
  typedef byte unsigned frame_t[$];
  frame_t sm_q[$], cpu_q[$], all_exp_sm[$], all_exp_cpu[$];
  int sm_pos = 0, cpu_pos = 0;
  string order = "";

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // sources: present the head frame, advance on handshake
  always_comb begin
    sm_valid  = sm_q.size() > 0;
    cpu_valid = cpu_q.size() > 0;
    sm_beat   = sm_valid  ? '{data: sm_q[0][sm_pos],  sop: sm_pos == 0,  eop: sm_pos == sm_q[0].size()-1}  : '0;
    cpu_beat  = cpu_valid ? '{data: cpu_q[0][cpu_pos], sop: cpu_pos == 0, eop: cpu_pos == cpu_q[0].size()-1} : '0;
  end
  always @(posedge clk) if (rst_n) begin
    if (sm_valid && sm_ready) begin
      if (sm_beat.eop) begin sm_q.pop_front(); sm_pos <= 0; end else sm_pos <= sm_pos + 1;
    end
    if (cpu_valid && cpu_ready) begin
      if (cpu_beat.eop) begin cpu_q.pop_front(); cpu_pos <= 0; end else cpu_pos <= cpu_pos + 1;
    end
  end

  // MAC model
  frame_t cur;
  bit streaming = 0;
  int wait_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (!streaming) begin
      if (mac_tx_dv && mac_tx_sop) begin
        if (wait_cnt == 0) wait_cnt <= $urandom_range(1, 5);
        else if (mac_tx_ack) begin
          cur = {mac_tx_data};
          streaming = 1;
          wait_cnt <= 0;
        end else wait_cnt <= wait_cnt - 1;
      end
    end else begin
      check(mac_tx_dv, "MAC fed on every cycle");
      cur.push_back(mac_tx_data);
      if (mac_tx_eop) begin
        streaming = 0;
        if (cur[0] >= 8'hC0) begin
          order = {order, "C"};
          check(cur == all_exp_cpu[0], "CPU frame contents");
          void'(all_exp_cpu.pop_front());
        end else begin
          order = {order, "S"};
          check(cur == all_exp_sm[0], "SM frame contents");
          void'(all_exp_sm.pop_front());
        end
      end
    end
  end
  assign mac_tx_ack = !streaming && mac_tx_dv && wait_cnt == 1;

  task automatic load(input int n_sm, input int n_cpu);
    for (int i = 0; i < n_sm; i++) begin
      frame_t f;
      f.push_back(8'($urandom_range(0, 8'hBF)));
      repeat ($urandom_range(10, 30)) f.push_back(8'($urandom));
      sm_q.push_back(f); all_exp_sm.push_back(f);
    end
    for (int i = 0; i < n_cpu; i++) begin
      frame_t f;
      f.push_back(8'($urandom_range(8'hC0, 8'hFF)));
      repeat ($urandom_range(10, 30)) f.push_back(8'($urandom));
      cpu_q.push_back(f); all_exp_cpu.push_back(f);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ratio = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(6, 6);
    while (all_exp_sm.size() || all_exp_cpu.size()) @(negedge clk);
    check(order == "SCSCSCSCSCSC", {"ratio 0 order ", order});
    order = "";
    ratio = 2;
    @(negedge clk);
    load(9, 5);
    while (all_exp_sm.size() || all_exp_cpu.size()) @(negedge clk);
    check(order == "SSSCSSSCSSSCCC", {"ratio 2 order ", order});
    order = "";
    load(0, 2);
    while (all_exp_cpu.size()) @(negedge clk);
    check(order == "CC", "lone CPU source served");
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
