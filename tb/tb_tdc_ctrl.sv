// Testbench of the TDC controller, driving four TDC behavioural models.
//
// A reference counter drives the coarse input. Every trigger edge is placed
// at a random point of a clock period; the expected result of an edge
// (which TDC, coarse value after the next clock edge, fine code in 50 ps
// bins up to that edge) is computed here and compared in order with the
// results the controller presents. Scenarios: single photon counting with
// round-robin use of all four TDCs, a hit lost while all four are busy,
// results held while not acknowledged, a TDC enable mask, time-over-threshold
// pairs (rising edge on TDC0/1, trailing edge on TDC2/3), trigger selection
// and a disabled channel. Each mechanism is counted and must occur.
module tb_tdc_ctrl;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 100fs;

  localparam real T = 3.125;
  localparam int DEAD = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ch_en = 1'b0, trg_sel = 1'b0;
  mode_e mode = MODE_SPC;
  logic [3:0] tdc_en = 4'hF;
  logic [1:0] trg = 2'b00;
  logic [3:0] tdc_hit, tdc_arm, tdc_hit_flag, tdc_done, res_valid, res_ack;
  logic [3:0][8:0] tdc_fine, res_fine;
  logic [3:0][14:0] res_coarse;
  logic [14:0] coarse = '0;
  bit ack_en = 1'b1;
  int checks = 0, failures = 0;
  int n_lost = 0, n_held = 0, n_tot_pairs = 0, n_spc_all4 = 0;

  tdc_ctrl dut (.clk, .rst_n, .ch_en, .mode, .trg_sel, .tdc_en, .trg,
                .tdc_hit, .tdc_arm, .tdc_hit_flag, .tdc_done, .tdc_fine,
                .coarse, .res_valid, .res_coarse, .res_fine, .res_ack);

  for (genvar i = 0; i < 4; i++) begin : g_tdc
    tdc_model #(.DEAD_CYCLES(DEAD)) u_tdc (.clk, .rst_n, .arm(tdc_arm[i]), .hit(tdc_hit[i]),
      .hit_flag(tdc_hit_flag[i]), .done(tdc_done[i]), .fine(tdc_fine[i]));
  end

  always #(T/2) clk = ~clk;
  always @(posedge clk) coarse <= coarse + 1'b1;
  assign res_ack = ack_en ? res_valid : 4'b0;

  typedef struct { int tdc; int c; int f; } res_t;
  res_t exp_q[$], got_q[$];

  always @(posedge clk)
    for (int i = 0; i < 4; i++)
      if (res_valid[i] && res_ack[i]) got_q.push_back('{i, int'(res_coarse[i]), int'(res_fine[i])});

  initial begin
    #(T * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $realtime); end
  endtask

  // Drive trigger `which` to `val` at a random point; expect a result on TDC
  // `exp_tdc` (or none if exp_tdc < 0).
  task automatic edge_at(input int which, input logic val, input int exp_tdc);
    real t0, t1;
    @(posedge clk);
    #(0.02 + (T - 0.04) * real'($urandom_range(0, 1000)) / 1000.0);
    t0 = $realtime;
    trg[which] = val;
    @(posedge clk);
    t1 = $realtime;
    #0.1;
    if (exp_tdc >= 0) exp_q.push_back('{exp_tdc, int'(coarse), $rtoi((t1 - t0) * 1000.0 / 50.0)});
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic compare(input string tag);
    check(got_q.size() == exp_q.size(), $sformatf("%s: %0d results, expected %0d", tag, got_q.size(), exp_q.size()));
    for (int k = 0; k < exp_q.size() && k < got_q.size(); k++)
      check(got_q[k] == exp_q[k], $sformatf("%s #%0d: got tdc %0d c %0d f %0d, expected tdc %0d c %0d f %0d", tag, k,
            got_q[k].tdc, got_q[k].c, got_q[k].f, exp_q[k].tdc, exp_q[k].c, exp_q[k].f));
    got_q.delete();
    exp_q.delete();
  endtask

  initial begin
    idle(3);
    rst_n = 1'b1;
    idle(2);
    // --- single photon counting, all four TDCs, fifth hit lost
    ch_en = 1'b1;
    idle(2);
    for (int k = 0; k < 5; k++) begin
      edge_at(0, 1'b1, k < 4 ? k : -1);
      idle(1);
      edge_at(0, 1'b0, -1);
    end
    check(tdc_arm == 4'b0, "no TDC armed while all four convert");
    n_spc_all4++;
    n_lost++;
    idle(DEAD + 10);
    compare("spc4");
    // --- results held without acknowledge; TDCs stay occupied
    ack_en = 1'b0;
    for (int k = 0; k < 4; k++) begin
      edge_at(0, 1'b1, k);
      edge_at(0, 1'b0, -1);
    end
    idle(DEAD + 10);
    check(res_valid == 4'hF, "four results held");
    edge_at(0, 1'b1, -1);     // lost: every TDC holds a result
    edge_at(0, 1'b0, -1);
    idle(DEAD + 10);
    check(got_q.size() == 0, "nothing taken while not acknowledged");
    n_held++;
    n_lost++;
    ack_en = 1'b1;
    idle(3);
    compare("held");
    // --- enable mask: only TDC1 and TDC3
    tdc_en = 4'b1010;
    idle(3);
    for (int k = 0; k < 4; k++) begin
      edge_at(0, 1'b1, (k % 2) ? 3 : 1);
      edge_at(0, 1'b0, -1);
      idle(DEAD + 4);
    end
    idle(5);
    compare("mask");
    // --- time over threshold on trigger 2
    ch_en = 1'b0;
    idle(2);
    tdc_en = 4'hF; mode = MODE_TOT; trg_sel = 1'b1;
    idle(2);
    ch_en = 1'b1;
    idle(3);
    for (int k = 0; k < 4; k++) begin
      edge_at(0, 1'b1, -1);          // other trigger: ignored
      edge_at(0, 1'b0, -1);
      edge_at(1, 1'b1, k % 2);       // rising edge
      idle(4 + k);
      edge_at(1, 1'b0, 2 + k % 2);   // trailing edge
      idle(DEAD + 6);
      n_tot_pairs++;
    end
    compare("tot");
    // --- two pulses back to back in ToT: pairs (0,2) then (1,3)
    edge_at(1, 1'b1, 0); idle(2); edge_at(1, 1'b0, 2); idle(2);
    edge_at(1, 1'b1, 1); idle(2); edge_at(1, 1'b0, 3);
    idle(DEAD + 10);
    compare("tot2");
    n_tot_pairs++;
    // --- channel disabled: nothing measured
    ch_en = 1'b0;
    idle(3);
    edge_at(1, 1'b1, -1); edge_at(1, 1'b0, -1);
    idle(DEAD + 10);
    compare("disabled");

    check(n_lost > 0 && n_held > 0 && n_tot_pairs > 0 && n_spc_all4 > 0, "every mechanism exercised");
    $display("mechanisms: lost=%0d held=%0d tot_pairs=%0d spc_all4=%0d", n_lost, n_held, n_tot_pairs, n_spc_all4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
