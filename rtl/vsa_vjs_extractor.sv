// vsa_vjs_extractor - finds the operand block of an iterative loop.
//
// Watches the addresses of CPU_major's data reads. Each read address is
// subtracted from the previous one to give the step. While the step stays
// the same, a job-size counter counts the operands of the current run; the
// first address of the run is kept. When the step changes, the run has ended:
// if it held at least LOOP_THRESH operands (the minimum worth bypassing), its
// start address (VSA), operand count (VJS) and step are recorded and
// record_o pulses; otherwise the counter is cleared and the current address
// becomes the start of a new run. run_start_o pulses in the cycle of the read
// that starts a run, so the job-nature extractor can restart its own state.
// Only the first qualifying run is recorded (one loop per CPIM); enable_i low
// stops the unit. A step must be positive and fit STEP_W bits to qualify.
// The method follows the document; the threshold value is this design's.
module vsa_vjs_extractor
  import cim_pkg::*;
#(
  parameter int unsigned ADDR_W      = 20,
  parameter int unsigned JS_W        = 20,
  parameter int unsigned LOOP_THRESH = 8
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              enable_i,
  input  logic              clear_i,     // forget everything learned so far
  input  logic              rd_i,        // CPU_major data read this cycle
  input  logic [ADDR_W-1:0] rd_addr_i,
  output logic              run_start_o,
  output logic              record_o,
  output logic              valid_o,
  output logic [ADDR_W-1:0] vsa_o,
  output logic [JS_W-1:0]   vjs_o,
  output logic [STEP_W-1:0] step_o
);

  logic              have_prev_q, step_ok_q;
  logic [ADDR_W-1:0] prev_q, start_q, step_q, step_now;
  logic [JS_W-1:0]   cnt_q;
  logic              brk, step_fits;

  assign step_now    = rd_addr_i - prev_q;
  assign step_fits   = (step_q != '0) && (step_q < ADDR_W'(1 << STEP_W));
  assign brk         = enable_i && rd_i && have_prev_q && step_ok_q && (step_now != step_q);
  assign run_start_o = enable_i && rd_i && (!have_prev_q || brk);
  assign record_o    = brk && !valid_o && step_fits && (cnt_q >= JS_W'(LOOP_THRESH));

  always_ff @(posedge clk_i) begin
    if (!rst_ni || clear_i) begin
      have_prev_q <= 1'b0;
      step_ok_q   <= 1'b0;
      prev_q      <= '0;
      start_q     <= '0;
      step_q      <= '0;
      cnt_q       <= '0;
      valid_o     <= 1'b0;
      vsa_o       <= '0;
      vjs_o       <= '0;
      step_o      <= '0;
    end else if (enable_i && rd_i) begin
      prev_q      <= rd_addr_i;
      have_prev_q <= 1'b1;
      if (run_start_o) begin
        start_q   <= rd_addr_i;
        cnt_q     <= JS_W'(1);
        step_ok_q <= 1'b0;
      end else if (!step_ok_q) begin
        step_q    <= step_now;
        step_ok_q <= 1'b1;
        cnt_q     <= cnt_q + 1'b1;
      end else begin
        cnt_q     <= cnt_q + 1'b1;
      end
      if (record_o) begin
        valid_o <= 1'b1;
        vsa_o   <= start_q;
        vjs_o   <= cnt_q;
        step_o  <= step_q[STEP_W-1:0];
      end
    end
  end

endmodule
