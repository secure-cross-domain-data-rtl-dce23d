// json_pda: push-down automaton that checks a byte stream against the JSON
// grammar (one top-level value, optionally surrounded by white space).
//
// How it works: a finite control (the lexical and syntactic states below)
// plus a stack of container kinds, one bit per nesting level (1 = object,
// 0 = array). '{' and '[' push, '}' and ']' pop after checking that they
// match the top of the stack. Strings (with escapes and \uXXXX), numbers
// (RFC 8259 syntax) and the literals true/false/null are recognised by the
// finite control. A number ends at the first byte that cannot continue it;
// that byte is then handled as the byte after a complete value, in the same
// cycle. Nesting deeper than MAX_DEPTH is a grammar error (stack overflow).
//
// Interface and timing: one byte per clock when in_valid is high; there is
// no back-pressure. error_o is sticky and rises the clock after the first
// offending byte. accept_o is combinational and is high when the bytes seen
// since the last clear form exactly one complete JSON value. clear (or reset)
// returns the automaton to its start state; it takes priority over in_valid.
//
// The design description gives only what this block does (a JSON-grammar PDA
// generated from grammar tables with high-level synthesis). This hand-written
// automaton, its one-byte-per-cycle rate and the stack depth are choices of
// this implementation. Bytes of 0x80 and above are accepted inside strings
// without UTF-8 decoding.
module json_pda #(
  parameter int unsigned MAX_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       error_o,
  output logic       accept_o,
  output logic       overflow_o,
  output logic [$clog2(MAX_DEPTH+1)-1:0] depth_o
);

  localparam int unsigned DW = $clog2(MAX_DEPTH + 1);
  localparam int unsigned IW = (MAX_DEPTH > 1) ? $clog2(MAX_DEPTH) : 1;

  typedef enum logic [4:0] {
    S_VALUE,      // a value is expected
    S_OBJ_FIRST,  // just after '{': key or '}'
    S_OBJ_KEY,    // after ',' inside an object: key
    S_COLON,      // after a key: ':'
    S_AFTER,      // after a complete value
    S_STR,        // inside a string
    S_ESC,        // after a backslash
    S_UHEX,       // inside \uXXXX
    S_N_MINUS,    // after '-'
    S_N_ZERO,     // integer part is a single '0'
    S_N_INT,      // integer digits
    S_N_DOT,      // after '.'
    S_N_FRAC,     // fraction digits
    S_N_E,        // after 'e' / 'E'
    S_N_ESIGN,    // after exponent sign
    S_N_EXP,      // exponent digits
    S_LIT,        // inside true / false / null
    S_ERR
  } state_e;

  state_e               state_q, state_d;
  logic [MAX_DEPTH-1:0] stack_q, stack_d;
  logic [DW-1:0]        depth_q, depth_d;
  logic                 key_q, key_d;        // the string being read is a key
  logic                 arr_open_q, arr_open_d; // ']' may close an empty array
  logic [1:0]           cnt_q, cnt_d;        // \u digit count
  logic [1:0]           lit_q, lit_d;        // 0 true, 1 false, 2 null
  logic [2:0]           pos_q, pos_d;        // position inside the literal
  logic                 ovf_q, ovf_d;

  function automatic logic is_ws(input logic [7:0] c);
    return (c == 8'h20) || (c == 8'h09) || (c == 8'h0a) || (c == 8'h0d);
  endfunction

  function automatic logic is_digit(input logic [7:0] c);
    return (c >= "0") && (c <= "9");
  endfunction

  function automatic logic is_hex(input logic [7:0] c);
    return is_digit(c) || ((c >= "a") && (c <= "f")) || ((c >= "A") && (c <= "F"));
  endfunction

  function automatic logic num_final(input state_e s);
    return (s == S_N_ZERO) || (s == S_N_INT) || (s == S_N_FRAC) || (s == S_N_EXP);
  endfunction

  function automatic logic num_continues(input state_e s, input logic [7:0] c);
    logic e;
    e = (c == "e") || (c == "E");
    case (s)
      S_N_ZERO: return (c == ".") || e;
      S_N_INT:  return is_digit(c) || (c == ".") || e;
      S_N_FRAC: return is_digit(c) || e;
      S_N_EXP:  return is_digit(c);
      default:  return 1'b0;
    endcase
  endfunction

  function automatic logic [7:0] lit_char(input logic [1:0] sel, input logic [2:0] pos);
    case (sel)
      2'd0:    return (pos == 3'd1) ? "r" : (pos == 3'd2) ? "u" : "e";
      2'd1:    return (pos == 3'd1) ? "a" : (pos == 3'd2) ? "l" : (pos == 3'd3) ? "s" : "e";
      default: return (pos == 3'd1) ? "u" : "l";
    endcase
  endfunction

  function automatic logic [2:0] lit_last(input logic [1:0] sel);
    return (sel == 2'd1) ? 3'd4 : 3'd3;
  endfunction

  logic   top_is_obj;
  assign top_is_obj = (depth_q != '0) && stack_q[IW'(depth_q - 1'b1)];

  always_comb begin
    state_e st;
    logic [7:0] c;
    state_d    = state_q;
    stack_d    = stack_q;
    depth_d    = depth_q;
    key_d      = key_q;
    arr_open_d = arr_open_q;
    cnt_d      = cnt_q;
    lit_d      = lit_q;
    pos_d      = pos_q;
    ovf_d      = ovf_q;
    c          = in_data;
    st         = state_q;

    if (in_valid && state_q != S_ERR) begin
      // A number is finished by the first byte that cannot extend it.
      if (num_final(state_q) && !num_continues(state_q, c)) st = S_AFTER;

      case (st)
        S_VALUE: begin
          arr_open_d = 1'b0;
          if (is_ws(c)) begin
            arr_open_d = arr_open_q;
          end else if (c == "{" || c == "[") begin
            if (depth_q == DW'(MAX_DEPTH)) begin
              state_d = S_ERR;
              ovf_d   = 1'b1;
            end else begin
              stack_d[IW'(depth_q)] = (c == "{");
              depth_d          = depth_q + 1'b1;
              state_d          = (c == "{") ? S_OBJ_FIRST : S_VALUE;
              arr_open_d       = (c == "[");
            end
          end else if (c == "]" && arr_open_q) begin
            depth_d = depth_q - 1'b1;
            state_d = S_AFTER;
          end else if (c == "\"") begin
            key_d   = 1'b0;
            state_d = S_STR;
          end else if (c == "-") begin
            state_d = S_N_MINUS;
          end else if (c == "0") begin
            state_d = S_N_ZERO;
          end else if (is_digit(c)) begin
            state_d = S_N_INT;
          end else if (c == "t" || c == "f" || c == "n") begin
            lit_d   = (c == "t") ? 2'd0 : (c == "f") ? 2'd1 : 2'd2;
            pos_d   = 3'd1;
            state_d = S_LIT;
          end else begin
            state_d = S_ERR;
          end
        end

        S_OBJ_FIRST, S_OBJ_KEY: begin
          if (is_ws(c)) begin
            state_d = st;
          end else if (c == "\"") begin
            key_d   = 1'b1;
            state_d = S_STR;
          end else if (c == "}" && st == S_OBJ_FIRST) begin
            depth_d = depth_q - 1'b1;
            state_d = S_AFTER;
          end else begin
            state_d = S_ERR;
          end
        end

        S_COLON: begin
          if (c == ":")         state_d = S_VALUE;
          else if (!is_ws(c))   state_d = S_ERR;
        end

        S_AFTER: begin
          state_d = S_AFTER;
          if (is_ws(c)) begin
            state_d = S_AFTER;
          end else if (depth_q == '0) begin
            state_d = S_ERR;                       // trailing bytes
          end else if (c == ",") begin
            state_d = top_is_obj ? S_OBJ_KEY : S_VALUE;
          end else if ((c == "}" && top_is_obj) || (c == "]" && !top_is_obj)) begin
            depth_d = depth_q - 1'b1;
          end else begin
            state_d = S_ERR;
          end
        end

        S_STR: begin
          if (c == "\"")        state_d = key_q ? S_COLON : S_AFTER;
          else if (c == "\\")   state_d = S_ESC;
          else if (c < 8'h20)   state_d = S_ERR;
        end

        S_ESC: begin
          if (c == "u") begin
            cnt_d   = 2'd0;
            state_d = S_UHEX;
          end else if (c == "\"" || c == "\\" || c == "/" || c == "b" ||
                       c == "f" || c == "n" || c == "r" || c == "t") begin
            state_d = S_STR;
          end else begin
            state_d = S_ERR;
          end
        end

        S_UHEX: begin
          if (!is_hex(c))          state_d = S_ERR;
          else if (cnt_q == 2'd3)  state_d = S_STR;
          else                     cnt_d = cnt_q + 2'd1;
        end

        S_N_MINUS: begin
          if (c == "0")           state_d = S_N_ZERO;
          else if (is_digit(c))   state_d = S_N_INT;
          else                    state_d = S_ERR;
        end

        S_N_ZERO, S_N_INT: begin
          if (c == ".")                  state_d = S_N_DOT;
          else if (c == "e" || c == "E") state_d = S_N_E;
          else                           state_d = S_N_INT;  // digit (S_N_INT only)
        end

        S_N_DOT: begin
          state_d = is_digit(c) ? S_N_FRAC : S_ERR;
        end

        S_N_FRAC: begin
          if (c == "e" || c == "E") state_d = S_N_E;
        end

        S_N_E: begin
          if (c == "+" || c == "-") state_d = S_N_ESIGN;
          else if (is_digit(c))     state_d = S_N_EXP;
          else                      state_d = S_ERR;
        end

        S_N_ESIGN: begin
          state_d = is_digit(c) ? S_N_EXP : S_ERR;
        end

        S_N_EXP: begin
          state_d = S_N_EXP;
        end

        S_LIT: begin
          if (c != lit_char(lit_q, pos_q))  state_d = S_ERR;
          else if (pos_q == lit_last(lit_q)) state_d = S_AFTER;
          else                               pos_d = pos_q + 3'd1;
        end

        default: state_d = S_ERR;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_VALUE;
      stack_q    <= '0;
      depth_q    <= '0;
      key_q      <= 1'b0;
      arr_open_q <= 1'b0;
      cnt_q      <= '0;
      lit_q      <= '0;
      pos_q      <= '0;
      ovf_q      <= 1'b0;
    end else if (clear) begin
      state_q    <= S_VALUE;
      stack_q    <= '0;
      depth_q    <= '0;
      key_q      <= 1'b0;
      arr_open_q <= 1'b0;
      cnt_q      <= '0;
      lit_q      <= '0;
      pos_q      <= '0;
      ovf_q      <= 1'b0;
    end else begin
      state_q    <= state_d;
      stack_q    <= stack_d;
      depth_q    <= depth_d;
      key_q      <= key_d;
      arr_open_q <= arr_open_d;
      cnt_q      <= cnt_d;
      lit_q      <= lit_d;
      pos_q      <= pos_d;
      ovf_q      <= ovf_d;
    end
  end

  assign error_o    = (state_q == S_ERR);
  assign overflow_o = ovf_q;
  assign depth_o    = depth_q;
  assign accept_o   = (depth_q == '0) && ((state_q == S_AFTER) || num_final(state_q));

endmodule
