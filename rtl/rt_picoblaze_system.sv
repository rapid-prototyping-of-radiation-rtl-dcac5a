// rt_picoblaze_system: fault-emulation system around one hardened
// PicoBlaze-3 compatible processor.
//
// It joins the processor under test (pb_core, hardening version HARDEN),
// its 1K x 18 program store, an output register, an SEU injector and a
// Smart Table. The output register captures {port_id, out_port} on every
// OUTPUT instruction and is what the Smart Table watches. A run is one
// execution of the program from reset:
//   1. load the program through load_we/load_addr/load_data while run = 0
//      (the processor is held in reset);
//   2. golden run: st_mode = ST_GOLDEN, inj_arm = 0, raise run; the table
//      records every output change with its cycle; pulse st_finish and drop
//      run when the program has finished;
//   3. test runs: st_mode = ST_TEST, set t_crit and the injection point
//      (inj_cycle, inj_target, inj_bit, inj_copy, inj_arm = 1), raise run;
//      st_done rises with the verdict, the processor is then stopped (held
//      in reset) until run falls.
// Cycle numbers count clock edges after the cycle in which run rose.
// in_port and interrupt reach the processor directly; interrupt_ack and the
// raw I/O strobes are brought out.
//
// The composition (one target processor, SEU injection, a Smart Table
// replacing the golden copy) follows the design description; watching the
// latched {port_id, out_port}, the run/stop handshake and stopping by reset
// are this design's choices.
module rt_picoblaze_system
  import pb_pkg::*;
  import ftu_pkg::*;
#(
  parameter harden_t HARDEN = P1
) (
  input  logic            clk,
  input  logic            rst,
  // program loading
  input  logic            load_we,
  input  logic [PC_W-1:0] load_addr,
  input  logic [IW-1:0]   load_data,
  // run control
  input  logic            run,
  // processor I/O
  input  logic [7:0]      in_port,
  input  logic            interrupt,
  output logic            interrupt_ack,
  output logic [7:0]      port_id,
  output logic [7:0]      out_port,
  output logic            write_strobe,
  output logic            read_strobe,
  output logic [15:0]     out_reg,
  // Smart Table
  input  st_mode_t        st_mode,
  input  logic            st_finish,
  input  logic [15:0]     t_crit,
  output logic            st_done,
  output st_verdict_t     st_verdict,
  output logic [8:0]      st_entries,
  output logic [31:0]     st_recovery_time,
  output logic [31:0]     st_cycle,
  // SEU injection
  input  logic            inj_arm,
  input  logic [31:0]     inj_cycle,
  input  seu_target_t     inj_target,
  input  logic [7:0]      inj_bit,
  input  logic [1:0]      inj_copy,
  output logic            inj_done
);
  logic            run_q, start, stop, core_rst;
  logic [PC_W-1:0] address;
  logic [IW-1:0]   instruction;
  seu_t            seu;

  always_ff @(posedge clk) begin
    if (rst) run_q <= 1'b0;
    else     run_q <= run;
  end

  assign start    = run && !run_q;
  assign core_rst = rst || !run || stop;

  pb_program_store #(.DEPTH(1 << PC_W), .IW(IW)) u_prog (
    .clk, .addr(address), .instr(instruction), .load_we, .load_addr, .load_data
  );

  pb_core #(.HARDEN(HARDEN)) u_core (
    .clk, .rst(core_rst), .address, .instruction, .port_id, .out_port, .write_strobe,
    .in_port, .read_strobe, .interrupt, .interrupt_ack, .seu
  );

  always_ff @(posedge clk) begin
    if (core_rst)          out_reg <= '0;
    else if (write_strobe) out_reg <= {port_id, out_port};
  end

  seu_injector #(.CW(32)) u_inj (
    .clk, .rst, .start, .arm(inj_arm), .inject_cycle(inj_cycle), .target(inj_target),
    .bit_idx(inj_bit), .copy(inj_copy), .seu, .injected(inj_done)
  );

  smart_table #(.OW(16), .DEPTH(256), .CW(32), .TW(16)) u_st (
    .clk, .rst, .mode(st_mode), .start, .finish(st_finish), .t_crit, .dut_out(out_reg),
    .done(st_done), .verdict(st_verdict), .entries(st_entries), .recovery_time(st_recovery_time),
    .cycle(st_cycle), .stop
  );
endmodule
