// fs_coder: writes the coded bits of one CCSDS-121 block (or zero-block run) as a
// sequence of fields (up to 32 bits each) for the packer.
//
// Order of a coded block: option identifier; the reference sample (D bits, raw)
// right after the identifier if the block carries one; then the data part:
//   zero-block  FS code of the run code `zb_code`
//   second ext. FS code of each of the J/2 gamma values
//   FS / split  FS code of (delta >> k) for every non-reference sample, then the
//               k low bits of every non-reference sample
//   no compr.   every non-reference sample on D bits.
// An FS code of value v is v zeros and a one; runs of zeros go out 32 at a time.
// The block and gamma buffers are read through combinational read ports.
// A pulse on `start` latches the request; `done` pulses when the last field has
// been accepted. One field per cycle while out_ready is high.
module fs_coder
  import shyloc_pkg::*;
#(
  parameter int unsigned D  = 16,
  parameter int unsigned J  = 32,
  parameter int unsigned GW = 2*D + 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  option_e                option,
  input  logic [4:0]             k,
  input  logic                   has_ref,
  input  logic [D-1:0]           ref_value,
  input  logic [6:0]             zb_code,
  output logic [$clog2(J)-1:0]   blk_addr,
  input  logic [D-1:0]           blk_data,
  output logic [$clog2(J/2)-1:0] gam_addr,
  input  logic [GW-1:0]          gam_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output field_t                 out_field,
  output logic                   busy,
  output logic                   done
);

  localparam int unsigned IDL = id_len(D);
  localparam int unsigned JW  = $clog2(J);

  typedef enum logic [2:0] { S_IDLE, S_ID, S_REF, S_FS, S_SPLIT, S_RAW } state_e;

  state_e        st_q;
  option_e       opt_q;
  logic [4:0]    k_q;
  logic          ref_q;
  logic [D-1:0]  refv_q;
  logic [6:0]    zb_q;
  logic [JW:0]   idx_q;       // sample or pair index
  logic          fs_busy_q;   // an FS code is partly written
  logic [GW-1:0] fs_left_q;   // zeros still to write for that code
  logic [GW-1:0] fs_val;      // value to code with FS at idx_q
  logic [JW:0]   first_idx, n_items;
  logic          last_item;

  assign first_idx = ref_q ? (JW+1)'(1) : '0;
  assign n_items   = (opt_q == OPT_SE) ? (JW+1)'(J/2) : (opt_q == OPT_ZB) ? (JW+1)'(1) : (JW+1)'(J);
  assign last_item = (idx_q + 1'b1 == n_items);
  assign blk_addr  = idx_q[JW-1:0];
  assign gam_addr  = idx_q[$clog2(J/2)-1:0];

  always_comb begin
    case (opt_q)
      OPT_ZB:  fs_val = GW'(zb_q);
      OPT_SE:  fs_val = gam_data;
      default: fs_val = GW'(blk_data >> k_q);
    endcase
  end

  // Field of the current state.
  logic [GW-1:0] zeros;
  always_comb begin
    out_field = '0;
    zeros     = fs_busy_q ? fs_left_q : fs_val;
    case (st_q)
      S_ID: begin
        case (opt_q)
          OPT_ZB:  begin out_field.bits = '0;                 out_field.len = LEN_BITS'(IDL + 1); end
          OPT_SE:  begin out_field.bits = 1;                  out_field.len = LEN_BITS'(IDL + 1); end
          OPT_NC:  begin out_field.bits = (1 << IDL) - 1;     out_field.len = LEN_BITS'(IDL);     end
          default: begin out_field.bits = FIELD_W'(k_q) + 1;  out_field.len = LEN_BITS'(IDL);     end
        endcase
      end
      S_REF: begin out_field.bits = FIELD_W'(refv_q); out_field.len = LEN_BITS'(D); end
      S_FS: begin
        if (zeros >= GW'(FIELD_W)) begin out_field.bits = '0; out_field.len = LEN_BITS'(FIELD_W); end
        else begin out_field.bits = 1; out_field.len = LEN_BITS'(zeros) + 1'b1; end
      end
      S_SPLIT: begin
        out_field.bits = FIELD_W'(blk_data) & ((FIELD_W'(1) << k_q) - 1);
        out_field.len  = LEN_BITS'(k_q);
      end
      S_RAW: begin out_field.bits = FIELD_W'(blk_data); out_field.len = LEN_BITS'(D); end
      default: ;
    endcase
  end

  assign out_valid = (st_q != S_IDLE);
  assign busy      = (st_q != S_IDLE);

  // State after the identifier and reference sample.
  function automatic state_e body_state(option_e o);
    return (o == OPT_NC) ? S_RAW : S_FS;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; opt_q <= OPT_NC; k_q <= '0; ref_q <= 1'b0; refv_q <= '0; zb_q <= '0;
      idx_q <= '0; fs_busy_q <= 1'b0; fs_left_q <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st_q)
        S_IDLE: if (start) begin
          st_q <= S_ID; opt_q <= option; k_q <= k; ref_q <= has_ref; refv_q <= ref_value;
          zb_q <= zb_code; fs_busy_q <= 1'b0;
        end
        S_ID: if (out_ready) begin
          st_q  <= ref_q ? S_REF : body_state(opt_q);
          idx_q <= (opt_q == OPT_SE || opt_q == OPT_ZB) ? '0 : first_idx;
        end
        S_REF: if (out_ready) st_q <= body_state(opt_q);
        S_FS: if (out_ready) begin
          if (zeros >= GW'(FIELD_W)) begin
            fs_busy_q <= 1'b1;
            fs_left_q <= zeros - GW'(FIELD_W);
          end else begin
            fs_busy_q <= 1'b0;
            if (last_item) begin
              if (opt_q == OPT_K && k_q != '0) begin
                st_q <= S_SPLIT; idx_q <= first_idx;
              end else begin
                st_q <= S_IDLE; done <= 1'b1;
              end
            end else idx_q <= idx_q + 1'b1;
          end
        end
        S_SPLIT, S_RAW: if (out_ready) begin
          if (last_item) begin st_q <= S_IDLE; done <= 1'b1; end
          else idx_q <= idx_q + 1'b1;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

endmodule
