// blk_if: block port between a coprocessor unit and the memory sequencer.
//
// A unit raises req and holds it, with we, addr, nbytes and wdata stable, until
// done pulses.  nbytes (1..8) bytes are moved: a read returns them in rdata, most
// significant byte from the lowest address, with the unused bytes zero; a write
// stores the first nbytes bytes of wdata.  addr must be a multiple of four.
interface blk_if;
  logic        req;
  logic        we;
  logic [31:0] addr;
  logic [3:0]  nbytes;
  logic [63:0] wdata;
  logic        done;
  logic [63:0] rdata;

  modport unit (output req, we, addr, nbytes, wdata, input done, rdata);
  modport mem  (input req, we, addr, nbytes, wdata, output done, rdata);
endinterface
