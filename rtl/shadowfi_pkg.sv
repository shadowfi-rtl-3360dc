// Shared types and constants of the saboteur fault-injection infrastructure.
//
// The fault-model code is the two-bit value C[1:0] that every SBTR shift
// register holds in its two most significant bits and broadcasts to its
// Type I saboteurs. The encoding follows the saboteur truth table:
// C = 00 stuck-at-0, C = 01 stuck-at-1, C = 1x single event transient (the
// net is inverted while the activation signal is high). Type II saboteurs
// (SEU on flip-flops, or MEU when several adjacent ones are selected) ignore
// C. FM_SET_ALT is the second code that also selects SET, since C0 is a
// don't-care for it. The code values follow the published saboteur table;
// gathering them in an enum, and the 32-bit host word width used by the
// controller, are this implementation's choices.
package shadowfi_pkg;

  typedef enum logic [1:0] {
    FM_SA0     = 2'b00,
    FM_SA1     = 2'b01,
    FM_SET     = 2'b10,
    FM_SET_ALT = 2'b11
  } fault_model_e;

  // Number of fault-model bits at the head of each SBTR shift register.
  localparam int unsigned FM_BITS = 2;

  // Width of the configuration words the controller accepts from its host.
  localparam int unsigned CFG_WORD_W = 32;

endpackage
