// pmc_pkg -- shared types and constants of the PC-driven memory power
// management controller (PMC).
//
// Power modes: every memory module has one active mode and several sleep
// modes.  Active, light sleep (LS) and shut down (SD) are the modes the design
// is evaluated with; deep sleep (DS) is the third power pin of the memory
// macros.  The 2-bit encoding below is a choice of this design.
//
// APB register map (byte addresses, 32-bit registers, also this design's
// choice):
//   entry i, i = 0 .. N_ENTRIES-1:
//     8*i + 0 : PC address of the entry
//     8*i + 4 : bank configuration of the entry
//               bits [2*m+1:2*m]  power mode of memory module m
//               bit  [2*N_MEM+m]  enable of memory module m
//   STATUS_ADDR     : read-only, current power mode of every module
//                     (same packing as the mode field above)
//   INFO_ADDR       : read-only, {8'(DELAY), 8'(N_MEM), 16'(N_ENTRIES)}
package pmc_pkg;

  typedef enum logic [1:0] {
    PM_ACTIVE = 2'd0,
    PM_LS     = 2'd1,   // light sleep: contents kept, fast wake-up
    PM_DS     = 2'd2,   // deep sleep: contents kept, periphery off
    PM_SD     = 2'd3    // shut down: contents lost
  } pm_e;

  // Number of bytes used by the entry table for N entries.
  function automatic int unsigned table_bytes(int unsigned n_entries);
    return 8 * n_entries;
  endfunction

  // Byte address of the status register and the info register, right
  // after the table.
  function automatic int unsigned status_addr(int unsigned n_entries);
    return table_bytes(n_entries);
  endfunction

  function automatic int unsigned info_addr(int unsigned n_entries);
    return table_bytes(n_entries) + 4;
  endfunction

endpackage
