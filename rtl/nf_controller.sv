// nf_controller: time-step sequencer of the two-phase computation.
//
// Each simulated millisecond is one time step made of two phases: the
// neuron state update (phase i) and then the synaptic accumulation of the
// neurons that fired (phase ii). After `run` the controller waits until the
// synapse lanes have cleared their memories, then for each of n_steps steps
// pulses su_start, waits for su_done, pulses sa_start, waits for sa_done and
// advances t_step. step_done pulses at the end of every step (the host may
// collect that step's spikes, e.g. for plasticity) and `done` pulses after
// the last step; t_step keeps counting across runs so that a simulation can
// be continued, and `clear_t` sets it back to zero. The two-phase step
// follows the design; the handshake with the kernels is this design's choice.
module nf_controller (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        clear_t,
  input  logic [31:0] n_steps,
  input  logic        lanes_ready,
  output logic        su_start,
  input  logic        su_done,
  output logic        sa_start,
  input  logic        sa_done,
  output logic [31:0] t_step,
  output logic        phase_su,
  output logic        phase_sa,
  output logic        busy,
  output logic        step_done,
  output logic        done
);
  typedef enum logic [2:0] {C_IDLE, C_WAIT_INIT, C_SU_GO, C_SU, C_SA_GO, C_SA} cstate_t;
  cstate_t     state;
  logic [31:0] left;

  assign busy     = (state != C_IDLE);
  assign phase_su = (state == C_SU_GO) || (state == C_SU);
  assign phase_sa = (state == C_SA_GO) || (state == C_SA);
  assign su_start = (state == C_SU_GO);
  assign sa_start = (state == C_SA_GO);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      left      <= '0;
      t_step    <= '0;
      step_done <= 1'b0;
      done      <= 1'b0;
    end else begin
      step_done <= 1'b0;
      done      <= 1'b0;
      case (state)
        C_IDLE: begin
          if (clear_t) t_step <= '0;
          if (run) begin
            left  <= n_steps;
            state <= C_WAIT_INIT;
          end
        end
        C_WAIT_INIT:
          if (left == 0) begin
            state <= C_IDLE;
            done  <= 1'b1;
          end else if (lanes_ready) state <= C_SU_GO;
        C_SU_GO: state <= C_SU;
        C_SU:    if (su_done) state <= C_SA_GO;
        C_SA_GO: state <= C_SA;
        C_SA:
          if (sa_done) begin
            t_step    <= t_step + 1;
            left      <= left - 1;
            step_done <= 1'b1;
            if (left == 1) begin
              state <= C_IDLE;
              done  <= 1'b1;
            end else begin
              state <= C_SU_GO;
            end
          end
        default: state <= C_IDLE;
      endcase
    end
  end

  // a kernel reports completion only while its phase is active
  always_ff @(posedge clk) begin
    if (su_done) assert (state == C_SU) else $error("nf_controller: stray su_done");
    if (sa_done) assert (state == C_SA) else $error("nf_controller: stray sa_done");
  end
endmodule
