// tb_ns_dft_delay_faults: the example's test sequence detecting transition
// (delay) faults at speed.
//
// A transition fault on a line makes one direction of change too slow: a
// slow-to-rise line that should go 0 -> 1 between two clock cycles still reads
// 0 when the next edge captures it (slow-to-fall likewise). Such a fault is
// injected on each of the three next-state lines of the controller's
// combinational part (the lines the state register captures), both polarities,
// one at a time, by overriding the state register input with the late value
// while the faulty transition is in flight. The optimal test sequence of the
// example is then run at one vector per clock. Every cycle the state seen on
// t_out is compared with a reference model carrying the same fault; a fault
// counts as detected when t_out differs from the fault-free value at some
// cycle. The design is taken at its default parameters.
module tb_ns_dft_delay_faults;
  import ns_dft_pkg::*;
  import tb_ns_dft_ref_pkg::*;

  logic              clk = 1'b0;
  logic              rst;
  logic [PI_W-1:0]   pi;
  logic [PO_W-1:0]   po;
  logic              t_mode;
  logic [EX_ISTG_SEL_W-1:0] t_sel;
  logic [SR_W-1:0]   t_out;
  logic [3:0]        dp_po_i, dp_po_o;
  logic [0:0]        obs;

  always #5 clk = ~clk;

  ns_dft_controller dut (
    .clk, .rst, .pi, .po, .t_mode, .t_sel, .t_out, .dp_po_i, .obs, .dp_po_o
  );

  int checks = 0, failures = 0, detected = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Late value of line bit b: the old value if the change old -> new is the
  // slow direction of the fault.
  function automatic logic [2:0] late(logic [2:0] old_v, logic [2:0] new_v, int b, bit rise);
    late = new_v;
    if (rise  && !old_v[b] &&  new_v[b]) late[b] = 1'b0;
    if (!rise &&  old_v[b] && !new_v[b]) late[b] = 1'b1;
  endfunction

  logic [SR_W-1:0] fval;

  initial begin
    logic [2:0] ms, mg, prev_line, prev_line_dut;
    arc_t       a;
    logic [3:0] ig;
    bit         det;
    int         first_det;
    rst = 1'b1; pi = '0; t_mode = 1'b0; t_sel = '0; dp_po_i = '0; obs = '0;
    for (int b = 0; b < SR_W; b++) begin
      for (int rise = 0; rise < 2; rise++) begin
        // reset, fault-free
        release dut.sr_d;
        rst = 1'b1;
        @(posedge clk); @(posedge clk);
        ms = RESET_STATE; mg = RESET_STATE;
        det = 1'b0; first_det = -1;
        prev_line = ref_arc(1'b0, RESET_STATE).n;  // line value during the reset cycle
        prev_line_dut = dut.comb_ns;
        for (int c = 0; c < PLAN_LEN; c++) begin
          @(negedge clk);
          rst = PLAN[c].rst; pi = PLAN[c].x; t_mode = PLAN[c].t_mode;
          #1;
          check(t_out == ms, $sformatf("fault b%0d %s cycle %0d: t_out=%0d, faulty model %0d",
                                       b, rise != 0 ? "STR" : "STF", c, t_out, ms));
          if (ms != mg && !det) begin det = 1'b1; first_det = c; end
          // DUT: drive the SR input with the late value of the faulty line
          fval = t_mode ? dut.istg_s2 : late(prev_line_dut, dut.comb_ns, b, rise[0]);
          force dut.sr_d = fval;
          prev_line_dut = dut.comb_ns;
          // faulty model
          a  = ref_arc(PLAN[c].x, ms);
          ig = ref_istg(PLAN[c].x, ms);
          if (PLAN[c].rst)         ms = RESET_STATE;
          else if (PLAN[c].t_mode) ms = ig[2:0];
          else                     ms = late(prev_line, a.n, b, rise[0]);
          prev_line = a.n;
          // fault-free model
          a  = ref_arc(PLAN[c].x, mg);
          ig = ref_istg(PLAN[c].x, mg);
          if (PLAN[c].rst)         mg = RESET_STATE;
          else if (PLAN[c].t_mode) mg = ig[2:0];
          else                     mg = a.n;
          @(posedge clk);
          // a reset still resets the register
          if (PLAN[c].rst) begin
            #1;
            check(t_out == RESET_STATE, "reset overridden by fault injection");
          end
        end
        release dut.sr_d;
        $display("next-state bit %0d slow-to-%s: %s (first at cycle %0d)", b,
                 rise != 0 ? "rise" : "fall", det ? "detected" : "not detected", first_det);
        if (det) detected++;
      end
    end
    $display("transition faults on next-state lines detected: %0d of %0d", detected, 2*SR_W);
    check(detected > 0, "no transition fault detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
