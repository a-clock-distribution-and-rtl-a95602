`timescale 1ps/1fs
// Testbench of phase_lock with a numeric plant: the measured phase is the PI phase
// (moved 1.25 ps per step) plus measurement noise below half a step, reported every
// WIN cycles as an averaged reading would be. From random start phases the module must
// reach the setpoint within half a step, report lock, use the expected number of steps,
// and correct a later disturbance (online operation).
module tb_phase_lock;
  import clksync_pkg::*;
  localparam int WIN = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  phase_t sp = phase_t'(1600 * 16), meas = '0;
  logic mv = 0, en, dir, locked, ev;
  logic [15:0] nst;
  longint ph_q;   // plant phase, ps*16
  always #3200 clk = ~clk;
  phase_lock dut (.clk, .rst, .enable(1'b1), .setpoint(sp), .meas_valid(mv), .meas,
                  .step_en(en), .step_dir(dir), .locked, .eval_done(ev), .steps_issued(nst));
  always @(posedge clk) if (en) ph_q = (ph_q + (dir ? 20 : 102400 - 20)) % 102400;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    mv <= (cyc % WIN == 0);
    meas <= phase_t'((ph_q + 102400 + $urandom_range(8) - 4) % 102400);
  end
  task automatic run_case(input longint start_q);
    int n0, waitc;
    longint e, expst;
    ph_q = start_q;
    n0 = nst;
    e = longint'(sp) - start_q;
    if (e > 51200) e -= 102400;
    if (e <= -51200) e += 102400;
    expst = (e < 0 ? -e : e) / 20;
    waitc = 0;
    @(posedge clk);
    while (!(locked && ev) && waitc < 200000) begin @(posedge clk); waitc++; end
    #1;
    begin
      longint r;
      r = longint'(sp) - ph_q;
      if (r > 51200) r -= 102400;
      if (r <= -51200) r += 102400;
      checks++;
      if (r > 10 || r < -10) begin failures++; $display("FAIL residual %0d", r); end
    end
    checks++;
    if (int'(nst) - n0 < expst - 1 || int'(nst) - n0 > expst + 8) begin
      failures++; $display("FAIL steps %0d expected about %0d", int'(nst) - n0, expst);
    end
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 5; k++) run_case(longint'($urandom_range(102399)));
    sp = phase_t'(300 * 16);
    run_case(ph_q);   // setpoint change while running
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(64'd20_000_000_000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
