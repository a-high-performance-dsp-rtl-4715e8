// External memory chip-select logic.
//
// Three 2-to-1 multiplexers, controlled by the DSP's external flag XF, route
// the program-space select, the data-space select or a constant "disabled"
// to each memory unit:
//   XF = 1 (power-on): EPROM <- PS, SRAM1 <- DS, SRAM2 disabled
//   XF = 0           : SRAM1 <- PS, SRAM2 <- DS, EPROM disabled
// Software runs its loader from the EPROM, copies code into SRAM1, then
// clears XF to run from SRAM1 with no wait-states.
//
// Combinational; all selects active low as on the DSP pins.
module memory_select
  import motor_ctrl_pkg::*;
(
  input  logic xf,
  input  logic ps_n,
  input  logic ds_n,
  output logic eprom_cs_n,
  output logic sram1_cs_n,
  output logic sram2_cs_n
);

  mem_map_e mode;
  assign mode = mem_map_e'(xf);

  always_comb begin
    unique case (mode)
      MAP_EPROM: begin
        eprom_cs_n = ps_n;
        sram1_cs_n = ds_n;
        sram2_cs_n = 1'b1;
      end
      default: begin  // MAP_RAM_BOOT
        eprom_cs_n = 1'b1;
        sram1_cs_n = ps_n;
        sram2_cs_n = ds_n;
      end
    endcase
  end

endmodule
