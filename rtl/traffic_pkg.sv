// traffic_pkg: state encodings of the elastic traffic light controller.
//
// road_phase_t is the state of the road-change thread: counting the first 30
// seconds of a period, or waiting for a request from the closed road.
// light_phase_t is the state of the light thread: yellow (2 seconds), all
// red (1 second), green (until the next change).
package traffic_pkg;

  typedef enum logic {
    PH_WAIT30  = 1'b0,
    PH_WAITREQ = 1'b1
  } road_phase_t;

  typedef enum logic [1:0] {
    LT_YELLOW = 2'd0,
    LT_RED    = 2'd1,
    LT_GREEN  = 2'd2
  } light_phase_t;

endpackage
