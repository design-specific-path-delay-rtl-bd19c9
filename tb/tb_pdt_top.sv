// tb_pdt_top: end-to-end test of both test configurations at their default
// sizes.
//
// Each configuration runs complete test sessions: first fault-free (error
// flag must stay 0), then with a path delay fault injected at a destination
// flip-flop (error flag must be set, and for the multi-phase configuration
// only for that destination), then fault-free again (the start of a session
// clears the error flags).  A delay fault is modelled by forcing the
// destination flip-flop to load the path output of one cycle earlier, for a
// single inversion combination in a single phase, so that only one of all the
// tests of the session can detect it.
//
// Checked as well: done exactly 6 x 2^K x phases + 2 edges after start (26
// for the single path, 386 for the multi-phase session); the destination value
// in every sampled cycle against a reference computed from the selected path
// (source value inverted once per set counter bit of the LUT levels the path
// passes); and counts of each mechanism (rising and falling transitions,
// inversion counter steps and wraps, every path selector phase, response
// samples, error detections, completed sessions), each of which must occur.
module tb_pdt_top;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       sp_start = 1'b0, mp_start = 1'b0;
  logic       sp_busy, sp_done, sp_error, mp_busy, mp_done, mp_error;
  logic [1:0] mp_err_dest;
  logic [2:0] mp_sel;
  int checks = 0, failures = 0;

  pdt_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters (multi-phase side) ----------------
  int n_rise = 0, n_fall = 0, n_cnt_step = 0, n_cnt_wrap = 0;
  int n_sample = 0, n_detect = 0, n_sessions = 0;
  int n_phase [4] = '{default: 0};
  logic s_prev = 1'b0, err_prev = 1'b0, done_prev = 1'b0;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      s_prev   <= dut.u_mp_test.u_seq.s;
      err_prev <= mp_error;
      done_prev <= mp_done;
      if (dut.u_mp_test.u_seq.s && !s_prev) n_rise++;
      if (!dut.u_mp_test.u_seq.s && s_prev) n_fall++;
      if (dut.u_mp_test.cnt_en) n_cnt_step++;
      if (dut.u_mp_test.cnt_en && dut.u_mp_test.cnt_last) n_cnt_wrap++;
      if (dut.u_mp_test.sample) begin
        n_sample++;
        case (mp_sel)
          3'b000: n_phase[0]++;
          3'b001: n_phase[1]++;
          3'b010: n_phase[2]++;
          3'b100: n_phase[3]++;
          default: ;
        endcase
      end
      if (mp_error && !err_prev) n_detect++;
      if (mp_done && !done_prev) n_sessions++;
    end
  end

  // ---------------- reference for the multi-phase destinations -------------
  // Counter bits along the selected path to y and z (all LUTs binate):
  // y: dAEJLy eAEJLy cEJLy fBFJLy -> 1111 1111 1110 1111
  // z: hCGKMz jCGKMz nDGKMz qHKMz -> 1111 1111 1111 1101
  function automatic int phase_of(input logic [2:0] sel);
    case (sel)
      3'b001:  return 1;
      3'b010:  return 2;
      3'b100:  return 3;
      default: return 0;
    endcase
  endfunction
  localparam logic [3:0] YMASK [4] = '{4'b1111, 4'b1111, 4'b1110, 4'b1111};
  localparam logic [3:0] ZMASK [4] = '{4'b1111, 4'b1111, 4'b1111, 4'b1101};

  // values a fault-free destination holds in the sample cycle: those of the
  // source and counter as they were one edge earlier
  logic       src_q1;
  logic [3:0] p_q1;
  logic [2:0] sel_q1;
  always_ff @(posedge clk) begin
    src_q1 <= dut.u_mp_paths.src_d;
    p_q1   <= dut.u_mp_paths.p;
    sel_q1 <= dut.u_mp_paths.sel;
  end
  bit check_ref = 1'b1;
  always @(negedge clk) begin
    if (rst_n && check_ref && dut.u_mp_test.sample) begin
      int ph;
      ph = phase_of(sel_q1);
      check(dut.u_mp_paths.y_q == (src_q1 ^ (^(p_q1 & YMASK[ph]))), "y matches selected path");
      check(dut.u_mp_paths.z_q == (src_q1 ^ (^(p_q1 & ZMASK[ph]))), "z matches selected path");
    end
  end

  // ---------------- delay fault injection ----------------
  // Multi-phase: slow destination y or z.  The path output one cycle late is
  // taken from the LUT output feeding the destination flip-flop.
  logic mp_slow_y, mp_slow_z, l_dly, m_dly;
  logic sp_slow_d, sp_node_dly;
  bit   mp_fault_y = 1'b0, mp_fault_z = 1'b0, sp_fault = 1'b0;
  logic [3:0] mp_fault_p;
  logic [2:0] mp_fault_sel;
  logic [1:0] sp_fault_p;

  always_ff @(posedge clk) begin
    l_dly       <= dut.u_mp_paths.o_l;
    m_dly       <= dut.u_mp_paths.o_m;
    sp_node_dly <= dut.u_sp_path.node[4];
    mp_slow_y <= (mp_fault_y && dut.u_mp_paths.p == mp_fault_p && mp_sel == mp_fault_sel)
                 ? l_dly : dut.u_mp_paths.o_l;
    mp_slow_z <= (mp_fault_z && dut.u_mp_paths.p == mp_fault_p && mp_sel == mp_fault_sel)
                 ? m_dly : dut.u_mp_paths.o_m;
    sp_slow_d <= (sp_fault && dut.u_sp_path.p == sp_fault_p) ? sp_node_dly
                                                             : dut.u_sp_path.node[4];
  end

  // ---------------- sessions ----------------
  task automatic mp_session(input bit exp_err, input logic [1:0] exp_dest);
    int edges;
    #1 mp_start = 1'b1; @(posedge clk); #1 mp_start = 1'b0;
    edges = 0;
    while (!mp_done && edges < 2000) begin
      @(posedge clk); #1;
      edges++;
    end
    check(edges == 6 * 16 * 4 + 2, $sformatf("multi-phase done after %0d edges, expected 386", edges));
    check(mp_error == exp_err, $sformatf("multi-phase error %b, expected %b", mp_error, exp_err));
    check(mp_err_dest == exp_dest, $sformatf("multi-phase err_dest %b, expected %b", mp_err_dest, exp_dest));
    check(mp_sel == 3'b000 && !mp_busy, "multi-phase idle on the main paths after done");
  endtask

  task automatic sp_session(input bit exp_err);
    int edges;
    #1 sp_start = 1'b1; @(posedge clk); #1 sp_start = 1'b0;
    edges = 0;
    while (!sp_done && edges < 2000) begin
      @(posedge clk); #1;
      edges++;
    end
    check(edges == 6 * 4 + 2, $sformatf("single-path done after %0d edges, expected 26", edges));
    check(sp_error == exp_err, $sformatf("single-path error %b, expected %b", sp_error, exp_err));
    check(!sp_busy, "single-path idle after done");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1 check(!sp_busy && !mp_busy && !sp_done && !mp_done && !sp_error && !mp_error,
             "idle after reset");

    // ---- single path ----
    sp_session(1'b0);
    force dut.u_sp_path.d_q = sp_slow_d;
    sp_fault_p = 2'b10; sp_fault = 1'b1;
    sp_session(1'b1);
    sp_fault = 1'b0;
    sp_session(1'b0);
    release dut.u_sp_path.d_q;

    // ---- multi-phase ----
    mp_session(1'b0, 2'b00);
    check_ref = 1'b0;  // the injected faults make the destinations differ on purpose
    // side path nDGKMz (phase 2), one inversion combination, slow at z
    force dut.u_mp_paths.z_q = mp_slow_z;
    mp_fault_p = 4'b1011; mp_fault_sel = 3'b010; mp_fault_z = 1'b1;
    mp_session(1'b1, 2'b10);
    mp_fault_z = 1'b0;
    release dut.u_mp_paths.z_q;
    // side path fBFJLy (phase 3), the all-0 combination, slow at y
    force dut.u_mp_paths.y_q = mp_slow_y;
    mp_fault_p = 4'b0000; mp_fault_sel = 3'b100; mp_fault_y = 1'b1;
    mp_session(1'b1, 2'b01);
    mp_fault_y = 1'b0;
    release dut.u_mp_paths.y_q;
    check_ref = 1'b1;
    mp_session(1'b0, 2'b00);

    repeat (2) @(posedge clk);
    #1;
    // ---- mechanisms (4 multi-phase sessions) ----
    check(n_rise == 4 * 64,  $sformatf("rising transitions %0d", n_rise));
    check(n_fall == 4 * 64,  $sformatf("falling transitions %0d", n_fall));
    check(n_cnt_step == 4 * 64, $sformatf("counter steps %0d", n_cnt_step));
    check(n_cnt_wrap == 4 * 4,  $sformatf("counter wraps %0d", n_cnt_wrap));
    check(n_sample == 4 * 128,  $sformatf("response samples %0d", n_sample));
    for (int ph = 0; ph < 4; ph++)
      check(n_phase[ph] == 4 * 32, $sformatf("samples in phase %0d: %0d", ph, n_phase[ph]));
    check(n_detect == 2, $sformatf("error detections %0d", n_detect));
    check(n_sessions == 4, $sformatf("sessions completed %0d", n_sessions));
    $display("mechanisms: rise=%0d fall=%0d counter steps=%0d wraps=%0d samples=%0d phases=%0d/%0d/%0d/%0d detections=%0d sessions=%0d",
             n_rise, n_fall, n_cnt_step, n_cnt_wrap, n_sample,
             n_phase[0], n_phase[1], n_phase[2], n_phase[3], n_detect, n_sessions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
