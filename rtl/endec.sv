// endec: command decoder of one FPGA. Every cycle the data address generator
// broadcasts a command code to all 32 FPGAs; ENDEC turns it into the enables
// of the other blocks: the GLOBREG load, the pipeline-store clear and shifts,
// the drive of the memory write bus, and the one-hot CORE section enables,
// which are active only while results are written.
// The document says only that ENDEC decodes command addresses into enable
// signals; the command set is this design's choice. Purely combinational.
module endec
  import zelig_pkg::*;
(
  input  cmd_e     cmd,
  input  section_e sec,          // section held in GLOBREG
  output logic     glob_load,
  output logic     st_clear,     // fill the store with border pixels
  output logic     st_shift,     // shift a row into the store
  output logic     st_border,    // the row shifted in is border pixels
  output logic     out_en,       // results go to the memory write bus
  output logic     en_dil,
  output logic     en_copy,
  output logic     en_max,
  output logic     en_trans
);
  always_comb begin
    glob_load = (cmd == CMD_LOADG);
    st_clear  = (cmd == CMD_CLEAR);
    st_shift  = (cmd == CMD_SHIFT) || (cmd == CMD_SHBRD);
    st_border = (cmd == CMD_SHBRD);
    out_en    = (cmd == CMD_WRITE);
    en_dil    = out_en && (sec == SEC_DILATE);
    en_copy   = out_en && (sec == SEC_COPY);
    en_max    = out_en && (sec == SEC_MAX);
    en_trans  = out_en && (sec == SEC_TRANS);
  end
endmodule
