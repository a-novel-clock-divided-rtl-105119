// bist_controller: sequencer of one memory BIST run.
//
// A run has two passes over the STEPS addresses of the address generator.
// Write pass: each cycle the current Hamming-encoded data word is written
// ('we') and the address and data generators step. On the last write the
// generators are reseeded ('reseed') instead of stepped, so the read pass
// replays exactly the same address/data sequence. Read pass: each cycle the
// memory is read ('re') through the error unit and decoder, and the decoded
// word is compared with the regenerated data word; 'ok' is the result of
// that comparison, 'fail' is set if any comparison fails, and 'err_count'
// counts reads whose syndrome was non-zero (errors found and corrected).
// After the read pass the controller sits in DONE with 'done' high until
// the next 'start'. The write-then-read sequencing, the OK definition and
// the counters are this design's; the source design names OK but does not
// define the controller.
//
// Interface: 'start' (pulse or level) begins a run from IDLE or DONE;
// 'rst' is synchronous and active high. Timing: a run takes 2*STEPS cycles
// from the cycle after 'start' to the first cycle with 'done' high. ok,
// we, re, step and reseed are combinational from the state and inputs;
// fail, err_count and done are registered.
module bist_controller
  import mbist_pkg::*;
#(
  parameter int unsigned STEPS = addr_gen_period(ADDR_W)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [DATA_W-1:0] expected,
  input  logic [DATA_W-1:0] decoded,
  input  logic              err_exist,
  output bist_phase_e       phase,
  output logic              step,
  output logic              reseed,
  output logic              we,
  output logic              re,
  output logic              ok,
  output logic              fail,
  output logic              done,
  output logic [7:0]        err_count
);

  localparam int unsigned CNT_W = $clog2(STEPS + 1);

  bist_phase_e       phase_q, phase_d;
  logic [CNT_W-1:0]  cnt_q, cnt_d;
  logic              last_step;
  logic              begin_run;

  assign last_step = (cnt_q == CNT_W'(STEPS - 1));
  assign begin_run = start && (phase_q == PH_IDLE || phase_q == PH_DONE);

  always_comb begin
    phase_d = phase_q;
    cnt_d   = cnt_q;
    step    = 1'b0;
    reseed  = 1'b0;
    we      = 1'b0;
    re      = 1'b0;
    ok      = 1'b1;
    unique case (phase_q)
      PH_IDLE, PH_DONE: begin
        if (begin_run) begin
          reseed  = 1'b1;
          cnt_d   = '0;
          phase_d = PH_WRITE;
        end
      end
      PH_WRITE: begin
        we = 1'b1;
        if (last_step) begin
          reseed  = 1'b1;
          cnt_d   = '0;
          phase_d = PH_READ;
        end else begin
          step  = 1'b1;
          cnt_d = cnt_q + 1'b1;
        end
      end
      PH_READ: begin
        re = 1'b1;
        ok = (decoded == expected);
        if (last_step) begin
          phase_d = PH_DONE;
        end else begin
          step  = 1'b1;
          cnt_d = cnt_q + 1'b1;
        end
      end
      default: phase_d = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_q   <= PH_IDLE;
      cnt_q     <= '0;
      fail      <= 1'b0;
      err_count <= '0;
    end else begin
      phase_q <= phase_d;
      cnt_q   <= cnt_d;
      if (begin_run) begin
        fail      <= 1'b0;
        err_count <= '0;
      end else if (re) begin
        if (!ok)                       fail      <= 1'b1;
        if (err_exist && err_count != 8'hFF) err_count <= err_count + 8'd1;
      end
    end
  end

  assign phase = phase_q;
  assign done  = (phase_q == PH_DONE);

  a_we_re_excl: assert property (@(posedge clk) disable iff (rst) !(we && re));

endmodule
