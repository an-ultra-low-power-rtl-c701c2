// power_manager: power management of the sensor node.
//
// While no speech is present only the VAD runs; the main ADC, the memory,
// the signal-processing module and the main application module are cut off
// from the supply. When the VAD reports speech this block connects them and
// switches the ADC to the high sampling rate; when speech ends it cuts them
// off again and returns to the low rate.
//
// `speech` is registered into the power state; the domain enables and
// `high_rate` are that state. `wake` and `sleep` pulse for one clock at
// the power-up and power-down edges, for the processor to start and stop
// its work. Reset leaves every controlled domain off.
//
// The switching of the domains on the VAD result and the rate change follow
// the design description; the list of domains is read from its node
// diagram, and the registered state and the edge pulses are this design's
// choices.
module power_manager
  import vad_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    speech,     // VAD output state
  output pwr_en_t pwr_en,     // supply enables of the controlled domains
  output logic    high_rate,  // ADC at the main-processor rate
  output logic    wake,       // domains switched on this cycle
  output logic    sleep       // domains switched off this cycle
);

  logic on_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      on_q  <= 1'b0;
      wake  <= 1'b0;
      sleep <= 1'b0;
    end else begin
      on_q  <= speech;
      wake  <= speech && !on_q;
      sleep <= !speech && on_q;
    end
  end

  assign pwr_en    = '{main_adc: on_q, memory: on_q, sig_proc: on_q, main_app: on_q};
  assign high_rate = on_q;

endmodule
