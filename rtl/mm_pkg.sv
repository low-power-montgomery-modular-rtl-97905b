// Shared types of the carry-save Montgomery multiplier.
//
// state_t is the control part's state encoding. ctl_t bundles the strobes the
// control part sends to the datapath each clock cycle:
//   load      - sample A, B, N; SS <= B, SC <= N; clear skip, q^, A^
//   pre_step  - one two-half-adder pass (2H_CSA) while forming D = B + N
//   pre_done  - SC reached zero: D <= SS, SS <= 0, SC <= 0, set up iteration 0
//   loop_step - one shifting modular addition (full-adder mode, 1F_CSA)
//   loop_last - this loop_step is the last iteration: clear q^, A^
//   conv_step - one 2H_CSA pass of the final carry-save to binary conversion
//   finish    - SC reached zero: copy SS to the result register
//   alpha     - CCSA mode, 1 = full adder, 0 = two serial half adders
//   skip_en   - iteration i+1 exists, so Skip_D may skip it
package mm_pkg;

  typedef enum logic [2:0] {
    ST_IDLE,
    ST_PRE,
    ST_LOOP,
    ST_CONV,
    ST_DONE
  } state_t;

  typedef struct packed {
    logic load;
    logic pre_step;
    logic pre_done;
    logic loop_step;
    logic loop_last;
    logic conv_step;
    logic finish;
    logic alpha;
    logic skip_en;
  } ctl_t;

endpackage
