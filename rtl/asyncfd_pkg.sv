// Shared types and constants of the flow-diagram phase-register designs.
//
// dt_phase_e names the eleven phases of the channel/peripheral data transfer
// block; the value of each name is its bit position in the one-hot phase
// vector ph[11:1] (bit 0 is unused so that PHi sits at bit i, as the phases are
// numbered from 1). chan_req_t bundles the four selection signals an IBM 360
// channel presents to the channel selection register: Select Out, Hold Out,
// Address Out and the local "own address recognised" signal. The phase
// numbering and the signal names follow the worked examples; the packing of
// the signals into types is this design's own choice.
package asyncfd_pkg;

  localparam int unsigned DT_NUM_PHASES = 11;

  typedef enum logic [3:0] {
    PH1  = 4'd1,   // ready for a data transfer (initial phase)
    PH2  = 4'd2,   // read: waiting for the peripheral to deliver a byte
    PH3  = 4'd3,   // read: Service In raised, byte offered to the channel
    PH4  = 4'd4,   // read: channel took the byte (Service Out up)
    PH5  = 4'd5,   // read: channel disconnected (Address Out)
    PH6  = 4'd6,   // write: Service In raised, byte requested from the channel
    PH7  = 4'd7,   // channel answered Service In with Command Out (stop)
    PH8  = 4'd8,   // write: byte from the channel had a parity error
    PH9  = 4'd9,   // write: good byte received, offered to the peripheral
    PH10 = 4'd10,  // write: Service Out dropped, waiting for the peripheral
    PH11 = 4'd11   // peripheral reported a transfer error (UC)
  } dt_phase_e;

  typedef struct packed {
    logic selo;   // Select Out
    logic hldo;   // Hold Out
    logic adro;   // Address Out
    logic ident;  // address of this control unit recognised
  } chan_req_t;

endpackage
