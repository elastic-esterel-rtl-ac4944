// elastic_pkg: types shared by the elastic control layer.
//
// eb_state_t is the state of an elastic buffer controller:
//   EB_EMPTY - no token stored, the output channel carries a bubble;
//   EB_HALF  - one token stored, offered on the output channel;
//   EB_FULL  - two tokens stored (one in each latch of the register), the
//              input channel is stopped.
package elastic_pkg;

  typedef enum logic [1:0] {
    EB_EMPTY = 2'd0,
    EB_HALF  = 2'd1,
    EB_FULL  = 2'd2
  } eb_state_t;

endpackage
