// perm_if: request port of the shared Ascon permutation.
//
// A user pulses start for one clock with the state and the round count
// (full = 1: 12 rounds, full = 0: 6 rounds); done pulses when state_out holds the
// permuted state, which stays valid until the next start.
interface perm_if;
  import lwc_pkg::*;
  logic         start;
  logic         full;
  ascon_state_t state_in;
  logic         done;
  ascon_state_t state_out;

  modport user (output start, full, state_in, input done, state_out);
  modport core (input start, full, state_in, output done, state_out);
endinterface
