// power_scheduler: the hardware scheduler unit that moves the chip between
// active mode and power-gated shutdown. It sits in the always-on domain.
//
// Shutdown: when software has written its results to the data RRAM it
// raises shutdown_req (the core's request to sleep). The scheduler asks the
// data-RRAM controller to copy the volatile remap table into the RRAM
// (save_req, answered by save_done), then turns off the supply of the core,
// the memory controllers and the memories (core_pwr_en, mem_pwr_en low,
// isolation on, core in reset). A shutdown request waits while the ENDURER
// wear remapper is moving data (endurer_busy).
//
// Wake-up: on data arrival (wake_evt, for example from a sensor) the
// supplies are switched on in the first cycle and reset and isolation are
// released in the second; the core runs from the third cycle, a 2-cycle
// (200 ns at 10 MHz) shutdown-to-active transition as published. At the same
// time restore_req starts the reload of the remap table, which the data-RRAM
// controller performs while the core already runs. After a chip reset the
// same wake-up sequence runs. A wake event that arrives while the table is
// being saved is remembered and ends the shutdown at once. The split of the
// two wake-up cycles and the handshakes are this design's choices.
module power_scheduler
  import nvmcu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   shutdown_req,
  input  logic   wake_evt,
  input  logic   endurer_busy,
  output logic   save_req,
  input  logic   save_done,
  output logic   restore_req,
  output logic   core_pwr_en,
  output logic   mem_pwr_en,
  output logic   iso_en,
  output logic   core_rst_n,
  output pmode_e mode
);

  pmode_e state;
  logic   wake_pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= PM_WAKE_PWR;
      wake_pend_q <= 1'b0;
    end else begin
      unique case (state)
        PM_WAKE_PWR: state <= PM_WAKE_RST;
        PM_WAKE_RST: state <= PM_ACTIVE;
        PM_ACTIVE:   if (shutdown_req && !endurer_busy) state <= PM_SAVE;
        PM_SAVE: begin
          if (wake_evt) wake_pend_q <= 1'b1;
          if (save_done) state <= PM_OFF;
        end
        PM_OFF: if (wake_evt || wake_pend_q) begin
          wake_pend_q <= 1'b0;
          state       <= PM_WAKE_PWR;
        end
        default: state <= PM_OFF;
      endcase
    end
  end

  always_comb begin
    mode        = state;
    save_req    = (state == PM_SAVE);
    restore_req = (state == PM_WAKE_RST);
    core_pwr_en = (state != PM_OFF);
    mem_pwr_en  = (state != PM_OFF);
    iso_en      = (state == PM_OFF) || (state == PM_WAKE_PWR);
    core_rst_n  = (state == PM_ACTIVE) || (state == PM_SAVE);
  end

endmodule
