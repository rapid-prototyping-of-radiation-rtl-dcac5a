// smart_table: the output checker of the fault-emulation harness. It takes
// the place of a golden copy of the processor and judges a faulty run with
// relaxed timing, so that a fault the software hardening corrects late is
// not counted as an error.
//
// Golden run (mode ST_GOLDEN): start clears the cycle counter and the table
// and takes the current dut_out as the baseline. From then on, each cycle in
// which dut_out differs from its value in the previous cycle appends the pair
// [dut_out, cycle] to the table (up to DEPTH pairs). finish ends the run;
// entries holds the number of pairs.
//
// Test run (mode ST_TEST): start clears the counter and the match pointer.
// For the next expected pair [E, C]:
//   - an output change to E at any cycle up to C + t_crit matches it, and the
//     pointer moves on; the lateness (cycle - C, if positive) updates
//     recovery_time, the largest lateness seen in the run;
//   - an output change to any other value up to C + t_crit gives
//     V_OUTPUT_DAMAGE;
//   - reaching cycle C + t_crit + 1 with no change gives V_TIMEOUT.
// When every pair has matched the verdict is V_NO_DAMAGE. A verdict sets done
// and stop (stop asks the harness to halt the emulation) until the next start;
// stop is already low in the cycle of that start.
//
// The golden-run recording, the [output, cycle] pairs, T_crit and the three
// verdicts are those of the design description. Detecting an output by its
// change of value, accepting early correct values, ignoring outputs after the
// last pair, the recovery_time report and all widths/depths are this
// design's choices.
module smart_table
  import ftu_pkg::*;
#(
  parameter int unsigned OW    = 16,    // watched output width
  parameter int unsigned DEPTH = 256,   // table entries
  parameter int unsigned CW    = 32,    // cycle counter width
  parameter int unsigned TW    = 16     // T_crit width
) (
  input  logic                       clk,
  input  logic                       rst,
  input  st_mode_t                   mode,
  input  logic                       start,
  input  logic                       finish,
  input  logic [TW-1:0]              t_crit,
  input  logic [OW-1:0]              dut_out,
  output logic                       done,
  output st_verdict_t                verdict,
  output logic [$clog2(DEPTH+1)-1:0] entries,
  output logic [CW-1:0]              recovery_time,
  output logic [CW-1:0]              cycle,
  output logic                       stop
);
  localparam int unsigned EW = $clog2(DEPTH + 1);

  logic [OW-1:0] exp_out [DEPTH];
  logic [CW-1:0] exp_cyc [DEPTH];

  logic          running;
  logic [OW-1:0] prev_out;
  logic [EW-1:0] idx;
  logic          changed;
  logic [OW-1:0] e_out;
  logic [CW-1:0] e_cyc, deadline, late;

  assign changed  = running && (dut_out != prev_out);
  assign e_out    = exp_out[idx[$clog2(DEPTH)-1:0]];
  assign e_cyc    = exp_cyc[idx[$clog2(DEPTH)-1:0]];
  assign deadline = e_cyc + CW'(t_crit);
  assign late     = (cycle > e_cyc) ? cycle - e_cyc : '0;
  assign stop     = done && !start;   // a new run is not held back

  always_ff @(posedge clk) begin
    if (rst) begin
      running       <= 1'b0;
      done          <= 1'b0;
      verdict       <= V_NONE;
      entries       <= '0;
      idx           <= '0;
      cycle         <= '0;
      prev_out      <= '0;
      recovery_time <= '0;
    end else if (start) begin
      running       <= (mode != ST_IDLE);
      done          <= 1'b0;
      verdict       <= V_NONE;
      idx           <= '0;
      cycle         <= '0;
      prev_out      <= dut_out;
      recovery_time <= '0;
      if (mode == ST_GOLDEN) entries <= '0;
    end else if (running) begin
      cycle    <= cycle + 1'b1;
      prev_out <= dut_out;
      unique case (mode)
        ST_GOLDEN: begin
          if (finish) running <= 1'b0;
          if (changed && entries < EW'(DEPTH)) begin
            exp_out[entries[$clog2(DEPTH)-1:0]] <= dut_out;
            exp_cyc[entries[$clog2(DEPTH)-1:0]] <= cycle;
            entries <= entries + 1'b1;
          end
        end
        ST_TEST: begin
          if (idx >= entries) begin
            running <= 1'b0; done <= 1'b1; verdict <= V_NO_DAMAGE;
          end else if (changed && cycle <= deadline) begin
            if (dut_out == e_out) begin
              idx <= idx + 1'b1;
              if (late > recovery_time) recovery_time <= late;
            end else begin
              running <= 1'b0; done <= 1'b1; verdict <= V_OUTPUT_DAMAGE;
            end
          end else if (cycle > deadline) begin
            running <= 1'b0; done <= 1'b1; verdict <= V_TIMEOUT;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
